// Multiplier testbench over every word size of the delay comparison:
// n = 3, 4, 8, 10, 11, 12 and 14 (moduli 9, 17, 257, 1025, 2049, 4097 and
// 16385). Sizes up to n = 8 are checked on every residue pair; the larger
// ones on all corner pairs plus 100000 random pairs each. Every size must
// exercise each subtractor path (borrow, no borrow, wrap to -1) and see
// zero and 2^n operands.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_mul_table1;
  localparam int NS = 7;
  localparam int unsigned SIZES [NS] = '{3, 4, 8, 10, 11, 12, 14};

  logic done [NS];
  int ck [NS], fl [NS], nn [NS], ng [NS], wr [NS], z [NS], t [NS], tr [NS];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NS; g++) begin : g_size
    mod_checker #(.N(SIZES[g]), .MUL(1'b1), .EXHAUSTIVE(SIZES[g] <= 8),
                  .RANDOM_PAIRS(100000)) u_chk (
      .done(done[g]), .checks(ck[g]), .failures(fl[g]), .n_nonneg(nn[g]), .n_neg(ng[g]),
      .n_wrap(wr[g]), .n_zero_op(z[g]), .n_top_op(t[g]), .n_top_res(tr[g]));
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    do begin
      #10;
      all_done = 1'b1;
      for (int i = 0; i < NS; i++) all_done &= done[i];
    end while (!all_done);
    for (int i = 0; i < NS; i++) begin
      $display("n=%0d: pairs=%0d failures=%0d nonneg=%0d borrow=%0d wrap=%0d top_res=%0d",
               SIZES[i], ck[i], fl[i], nn[i], ng[i], wr[i], tr[i]);
      checks += ck[i];
      failures += fl[i];
      if (nn[i] == 0 || ng[i] == 0 || wr[i] == 0 || z[i] == 0 || t[i] == 0) begin
        failures++;
        $display("FAIL n=%0d: a subtractor path or corner operand never occurred", SIZES[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
