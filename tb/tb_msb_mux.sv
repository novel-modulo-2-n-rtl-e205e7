// Self-checking testbench of msb_mux.
// Checks the default one-bit multiplexer on all eight input combinations and
// a four-bit instance on every d0/d1 pair with both select values.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_msb_mux;
  logic       d0, d1, sel, y;
  logic [3:0] w0, w1, wy;
  logic       wsel;
  int checks = 0, failures = 0;

  msb_mux           dut   (.d0(d0), .d1(d1), .sel(sel), .y(y));
  msb_mux #(.W(4))  dut_w (.d0(w0), .d1(w1), .sel(wsel), .y(wy));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int i, j, s;
    w0 = '0; w1 = '0; wsel = 1'b0;
    for (i = 0; i < 8; i++) begin
      {sel, d1, d0} = 3'(i);
      #1;
      checks++;
      if (y != (i[2] ? i[1] : i[0])) begin
        failures++;
        $display("FAIL sel=%0b d1=%0b d0=%0b y=%0b", sel, d1, d0, y);
      end
    end
    for (i = 0; i < 16; i++)
      for (j = 0; j < 16; j++)
        for (s = 0; s < 2; s++) begin
          w0 = 4'(i); w1 = 4'(j); wsel = 1'(s);
          #1;
          checks++;
          if (int'(wy) != (s != 0 ? j : i)) begin
            failures++;
            if (failures < 10) $display("FAIL W=4 d0=%0d d1=%0d sel=%0d y=%0d", i, j, s, wy);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
