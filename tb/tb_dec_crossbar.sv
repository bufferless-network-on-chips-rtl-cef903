// tb_dec_crossbar: random one-to-one allocations of five channels to the five
// output ports (some channels empty or unallocated). Each output must carry
// exactly the flit allocated to it, or an empty flit.
module tb_dec_crossbar;
  import dec_pkg::*;

  int checks = 0, failures = 0;
  flit_t ch [NUM_CH];
  flit_t out [NUM_CH];
  port_e alloc [NUM_CH];
  logic [NUM_CH-1:0] alloc_valid;

  dec_crossbar dut (.ch(ch), .alloc(alloc), .alloc_valid(alloc_valid), .out(out));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm [NUM_CH];
    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < NUM_CH; i++) perm[i] = i;
      for (int i = NUM_CH - 1; i > 0; i--) begin
        int j, tmp;
        j = $urandom_range(0, i);
        tmp = perm[i]; perm[i] = perm[j]; perm[j] = tmp;
      end
      for (int i = 0; i < NUM_CH; i++) begin
        ch[i]          = {1'b0, 32'($urandom), {$urandom, $urandom, $urandom, $urandom}};
        ch[i].valid    = ($urandom_range(0, 3) != 0);
        alloc[i]       = port_e'(perm[i]);
        alloc_valid[i] = ch[i].valid;
      end
      #1;
      for (int p = 0; p < NUM_CH; p++) begin
        flit_t e;
        e = '0;
        for (int i = 0; i < NUM_CH; i++) if (ch[i].valid && perm[i] == p) e = ch[i];
        checks++;
        if (out[p] != e) begin failures++; $display("trial %0d: port %0d wrong", t, p); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
