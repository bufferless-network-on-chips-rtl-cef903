// tb_dec_noc: end-to-end test of the DeC2 network-on-chip on a 4x4 mesh and a
// 4x4 torus running side by side. Each carries uniform random, tornado and
// bit-complement traffic, then a saturating burst, and must deliver every
// packet intact. The mechanisms of the design are counted and must each
// occur: injection, ejection, bypass-ring transfers, deflections and
// throttled injections. Deflections per flit are printed for both.
module tb_dec_noc;
  import dec_pkg::*;

  localparam int K = 4;
  localparam int NODES = K * K;
  localparam int M = NUM_SUBNETS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NODES-1:0]            pkt_valid [2], pkt_ready [2];
  logic [COORD_W-1:0]          pkt_dst_x [2][NODES], pkt_dst_y [2][NODES];
  logic [LEN_W-1:0]            pkt_len   [2][NODES];
  logic [PKT_FLITS*DATA_W-1:0] pkt_data  [2][NODES];
  flit_t                       ej_flit   [2][NODES][M];
  logic [31:0] cnt_inject [2], cnt_eject [2], cnt_deflect [2], cnt_bypass [2], cnt_throttle [2];
  int chk [2], fail [2];
  logic done [2];

  for (genvar t = 0; t < 2; t++) begin : g_net
    dec_noc #(.K_X(K), .K_Y(K), .TORUS(t == 1), .M(M), .QDEPTH(8)) dut (
      .clk(clk), .rst_n(rst_n),
      .pkt_valid(pkt_valid[t]), .pkt_ready(pkt_ready[t]),
      .pkt_dst_x(pkt_dst_x[t]), .pkt_dst_y(pkt_dst_y[t]), .pkt_len(pkt_len[t]), .pkt_data(pkt_data[t]),
      .ej_flit(ej_flit[t]),
      .cnt_inject(cnt_inject[t]), .cnt_eject(cnt_eject[t]), .cnt_deflect(cnt_deflect[t]),
      .cnt_bypass(cnt_bypass[t]), .cnt_throttle(cnt_throttle[t]));
    tb_noc_traffic #(.K_X(K), .K_Y(K), .M(M), .PHASE_CYC(400), .RATE_PCT(12),
                     .BURST_CYC(150), .DRAIN_CYC(5000), .NAME(t == 1 ? "torus4x4" : "mesh4x4")) gen (
      .clk(clk), .rst_n(rst_n),
      .pkt_valid(pkt_valid[t]), .pkt_ready(pkt_ready[t]),
      .pkt_dst_x(pkt_dst_x[t]), .pkt_dst_y(pkt_dst_y[t]), .pkt_len(pkt_len[t]), .pkt_data(pkt_data[t]),
      .ej_flit(ej_flit[t]), .cnt_inject(cnt_inject[t]), .cnt_eject(cnt_eject[t]),
      .checks(chk[t]), .failures(fail[t]), .done(done[t]));
  end

  int checks, failures;

  task automatic mech(string what, int count);
    checks++;
    if (count == 0) begin failures++; $display("mechanism never happened: %s", what); end
    else $display("  %-28s %0d", what, count);
  endtask

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1], fail[0] + fail[1] + 1);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    wait (done[0] && done[1]);
    checks = chk[0] + chk[1];
    failures = fail[0] + fail[1];
    for (int t = 0; t < 2; t++) begin
      $display("%s:", t ? "torus 4x4" : "mesh 4x4");
      mech("flits injected", int'(cnt_inject[t]));
      mech("flits ejected", int'(cnt_eject[t]));
      mech("bypass-ring transfers", int'(cnt_bypass[t]));
      mech("deflections", int'(cnt_deflect[t]));
      mech("throttled injections", int'(cnt_throttle[t]));
    end
    $display("deflections per flit: mesh %0.3f, torus %0.3f",
             real'(cnt_deflect[0]) / real'(cnt_inject[0]), real'(cnt_deflect[1]) / real'(cnt_inject[1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
