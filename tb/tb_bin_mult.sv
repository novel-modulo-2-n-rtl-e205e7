// Self-checking testbench of bin_mult at its default width.
// Applies every pair of residues 0..2^N and compares the (2N+1)-bit product
// with the integer product.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_bin_mult;
  localparam int unsigned N = mod2n1_pkg::N_DEFAULT;
  localparam int unsigned W = N + 1;

  logic [N:0]   a, b;
  logic [2*N:0] p;
  int checks = 0, failures = 0;

  bin_mult dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb;
    for (ea = 0; ea <= (1 << N); ea++) begin
      for (eb = 0; eb <= (1 << N); eb++) begin
        a = W'(ea);
        b = W'(eb);
        #1;
        checks++;
        if (int'(p) != ea * eb) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d p=%0d expected %0d", ea, eb, p, ea * eb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
