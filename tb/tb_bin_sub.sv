// Self-checking testbench of bin_sub at its default width.
// Applies every pair of (N+1)-bit operands and compares the difference and
// borrow with integer arithmetic: borrow = (a < b), diff = (a - b) mod 2^(N+1).
// A watchdog ends the run with a failure if it does not finish in time.
module tb_bin_sub;
  localparam int unsigned N = mod2n1_pkg::N_DEFAULT;
  localparam int unsigned W = N + 1;

  logic [N:0] a, b, diff;
  logic       borrow;
  int checks = 0, failures = 0;

  bin_sub dut (.a(a), .b(b), .diff(diff), .borrow(borrow));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb, ed;
    for (ea = 0; ea < (1 << W); ea++) begin
      for (eb = 0; eb < (1 << W); eb++) begin
        a = W'(ea);
        b = W'(eb);
        #1;
        ed = (ea - eb + (1 << W)) % (1 << W);
        checks++;
        if (int'(diff) != ed || borrow != (ea < eb)) begin
          failures++;
          if (failures < 10)
            $display("FAIL a=%0d b=%0d diff=%0d borrow=%0b expected %0d %0b",
                     ea, eb, diff, borrow, ed, ea < eb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
