// tb_dec_noc_full: the network at its default size, an 8x8 mesh of DeC2 nodes
// with two 128-bit subnetworks, taken through one complete run: uniform
// random, tornado and bit-complement traffic, a saturating burst, and a
// drain in which every packet must arrive intact at its destination.
module tb_dec_noc_full;
  import dec_pkg::*;

  localparam int K = 8;
  localparam int NODES = K * K;
  localparam int M = NUM_SUBNETS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NODES-1:0]            pkt_valid, pkt_ready;
  logic [COORD_W-1:0]          pkt_dst_x [NODES], pkt_dst_y [NODES];
  logic [LEN_W-1:0]            pkt_len   [NODES];
  logic [PKT_FLITS*DATA_W-1:0] pkt_data  [NODES];
  flit_t                       ej_flit   [NODES][M];
  logic [31:0] cnt_inject, cnt_eject, cnt_deflect, cnt_bypass, cnt_throttle;
  int chk, fail;
  logic done;

  dec_noc dut (
    .clk(clk), .rst_n(rst_n),
    .pkt_valid(pkt_valid), .pkt_ready(pkt_ready),
    .pkt_dst_x(pkt_dst_x), .pkt_dst_y(pkt_dst_y), .pkt_len(pkt_len), .pkt_data(pkt_data),
    .ej_flit(ej_flit),
    .cnt_inject(cnt_inject), .cnt_eject(cnt_eject), .cnt_deflect(cnt_deflect),
    .cnt_bypass(cnt_bypass), .cnt_throttle(cnt_throttle));

  tb_noc_traffic #(.K_X(K), .K_Y(K), .M(M), .PHASE_CYC(200), .RATE_PCT(8),
                   .BURST_CYC(60), .DRAIN_CYC(6000), .NAME("mesh8x8")) gen (
    .clk(clk), .rst_n(rst_n),
    .pkt_valid(pkt_valid), .pkt_ready(pkt_ready),
    .pkt_dst_x(pkt_dst_x), .pkt_dst_y(pkt_dst_y), .pkt_len(pkt_len), .pkt_data(pkt_data),
    .ej_flit(ej_flit), .cnt_inject(cnt_inject), .cnt_eject(cnt_eject),
    .checks(chk), .failures(fail), .done(done));

  int checks, failures;

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk, fail + 1);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    wait (done);
    checks = chk; failures = fail;
    $display("injected %0d ejected %0d bypassed %0d deflected %0d throttled %0d",
             cnt_inject, cnt_eject, cnt_bypass, cnt_deflect, cnt_throttle);
    checks++;
    if (cnt_bypass == 0 || cnt_deflect == 0 || cnt_throttle == 0 || cnt_inject == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
