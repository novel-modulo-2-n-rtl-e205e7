// Self-checking testbench of bin_add at its default width.
// Applies every (N+1)-bit operand with both carry-in values and compares
// {cout, sum} with the integer a + cin.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_bin_add;
  localparam int unsigned N = mod2n1_pkg::N_DEFAULT;
  localparam int unsigned W = N + 1;

  logic [N:0] a, sum;
  logic       cin, cout;
  int checks = 0, failures = 0;

  bin_add dut (.a(a), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, ec, es;
    for (ea = 0; ea < (1 << W); ea++) begin
      for (ec = 0; ec < 2; ec++) begin
        a   = W'(ea);
        cin = 1'(ec);
        #1;
        es = ea + ec;
        checks++;
        if (int'({cout, sum}) != es) begin
          failures++;
          if (failures < 10)
            $display("FAIL a=%0d cin=%0d got %0d expected %0d", ea, ec, {cout, sum}, es);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
