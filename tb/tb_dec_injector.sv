// tb_dec_injector: random occupancy and port counts. Injection must be
// granted exactly when fewer channels are occupied than the router has
// ports, the flit must land in the highest-numbered empty channel, and a
// refused request must raise throttle.
module tb_dec_injector;
  import dec_pkg::*;

  int checks = 0, failures = 0;
  chan_t ch_in [NUM_CH];
  chan_t ch_out [NUM_CH];
  chan_t inj_ch;
  logic inj_valid, inj_grant, throttle;
  logic [2:0] num_ports;
  int n_grant = 0, n_thr = 0;

  dec_injector dut (.ch_in(ch_in), .inj_valid(inj_valid), .inj_ch(inj_ch), .num_ports(num_ports),
                    .ch_out(ch_out), .inj_grant(inj_grant), .throttle(throttle));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int occ, slot;
    bit exp_grant;
    for (int t = 0; t < 5000; t++) begin
      occ = 0;
      for (int i = 0; i < NUM_CH; i++) begin
        ch_in[i].f       = {1'b0, 32'($urandom), {$urandom, $urandom, $urandom, $urandom}};
        ch_in[i].f.valid = ($urandom_range(0, 3) != 0);
        ch_in[i].req     = port_e'($urandom_range(0, 5));
        occ += int'(ch_in[i].f.valid);
      end
      inj_ch       = '{f: {1'b0, 32'($urandom), {$urandom, $urandom, $urandom, $urandom}}, req: PORT_E};
      inj_valid    = $urandom_range(0, 3) != 0;
      num_ports    = 3'($urandom_range(3, 5));
      #1;
      exp_grant = inj_valid && (occ < int'(num_ports));
      slot = -1;
      if (exp_grant)
        for (int i = 0; i < NUM_CH; i++) if (!ch_in[i].f.valid) slot = i;
      checks++;
      if (inj_grant != exp_grant || throttle != (inj_valid && !exp_grant)) begin
        failures++; $display("trial %0d: grant %0b exp %0b", t, inj_grant, exp_grant);
      end
      n_grant += int'(inj_grant);
      n_thr   += int'(throttle);
      for (int i = 0; i < NUM_CH; i++) begin
        chan_t e;
        e = ch_in[i];
        if (i == slot) begin e = inj_ch; e.f.valid = 1'b1; end
        checks++;
        if (ch_out[i] != e) begin failures++; $display("trial %0d: channel %0d wrong", t, i); end
      end
    end
    checks++;
    if (n_grant == 0 || n_thr == 0) begin failures++; $display("grant/throttle never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
