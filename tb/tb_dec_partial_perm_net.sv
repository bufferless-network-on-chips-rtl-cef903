// tb_dec_partial_perm_net: random sets of four channels (some empty, time
// stamps drawn from a small window so ties and wrap-around occur). Checks
// that the output is a permutation of the input and that channel 0 holds an
// oldest occupied flit, or is empty only when all inputs are empty.
module tb_dec_partial_perm_net;
  import dec_pkg::*;

  int checks = 0, failures = 0;
  chan_t in_ch [NUM_DIRS];
  chan_t out_ch [NUM_DIRS];

  dec_partial_perm_net dut (.in_ch(in_ch), .out_ch(out_ch));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [TS_W-1:0] base;
    for (int t = 0; t < 4000; t++) begin
      base = TS_W'($urandom);
      for (int i = 0; i < NUM_DIRS; i++) begin
        in_ch[i]            = '0;
        in_ch[i].f.valid    = ($urandom_range(0, 3) != 0);
        in_ch[i].f.hdr.ts   = base + TS_W'($urandom_range(0, 6));
        in_ch[i].f.hdr.dst_x = COORD_W'(i);               // tag to identify
        in_ch[i].f.data     = {$urandom, $urandom, $urandom, $urandom};
        in_ch[i].req        = port_e'($urandom_range(0, 5));
      end
      #1;
      // permutation: every input appears exactly once at the output
      begin
        int seen [NUM_DIRS];
        for (int i = 0; i < NUM_DIRS; i++) seen[i] = 0;
        for (int o = 0; o < NUM_DIRS; o++)
          for (int i = 0; i < NUM_DIRS; i++)
            if (out_ch[o] == in_ch[i]) begin seen[i]++; break; end
        for (int i = 0; i < NUM_DIRS; i++) begin
          checks++;
          if (seen[i] != 1) begin
            failures++;
            $display("trial %0d: input %0d appears %0d times", t, i, seen[i]);
          end
        end
      end
      // channel 0 is an oldest valid flit
      begin
        bit any; int oldest_age;
        any = 0;
        for (int i = 0; i < NUM_DIRS; i++) if (in_ch[i].f.valid) any = 1;
        checks++;
        if (out_ch[0].f.valid != any) begin
          failures++;
          $display("trial %0d: channel 0 validity wrong", t);
        end else if (any) begin
          // ages relative to base; smaller offset is older
          oldest_age = 99;
          for (int i = 0; i < NUM_DIRS; i++)
            if (in_ch[i].f.valid && int'(TS_W'(in_ch[i].f.hdr.ts - base)) < oldest_age)
              oldest_age = int'(TS_W'(in_ch[i].f.hdr.ts - base));
          checks++;
          if (int'(TS_W'(out_ch[0].f.hdr.ts - base)) != oldest_age) begin
            failures++;
            $display("trial %0d: channel 0 not the oldest", t);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
