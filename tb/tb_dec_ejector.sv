// tb_dec_ejector: random channel sets. The ejected flit must be the lowest
// occupied channel asking for Local, that channel must be emptied and all
// others left untouched; with no local flit nothing is ejected.
module tb_dec_ejector;
  import dec_pkg::*;

  int checks = 0, failures = 0;
  chan_t ch_in [NUM_CH];
  chan_t ch_out [NUM_CH];
  flit_t ej_flit;

  dec_ejector dut (.ch_in(ch_in), .ch_out(ch_out), .ej_flit(ej_flit));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx;
    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < NUM_CH; i++) begin
        ch_in[i].f       = {1'b0, 32'($urandom), {$urandom, $urandom, $urandom, $urandom}};
        ch_in[i].f.valid = $urandom_range(0, 1);
        ch_in[i].req     = ($urandom_range(0, 2) == 0) ? PORT_LOCAL : port_e'($urandom_range(0, 3));
      end
      #1;
      idx = -1;
      for (int i = NUM_CH - 1; i >= 0; i--)
        if (ch_in[i].f.valid && ch_in[i].req == PORT_LOCAL) idx = i;
      checks++;
      if (idx < 0) begin
        if (ej_flit.valid) begin failures++; $display("spurious ejection"); end
      end else if (ej_flit != ch_in[idx].f) begin
        failures++; $display("trial %0d: wrong flit ejected", t);
      end
      for (int i = 0; i < NUM_CH; i++) begin
        chan_t e;
        e = ch_in[i];
        if (i == idx) e.f.valid = 1'b0;
        checks++;
        if (ch_out[i] != e) begin failures++; $display("trial %0d: channel %0d changed", t, i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
