// tb_preproc_cell: exhaustive check of the pre-processing cell.
// For all four operand-bit pairs, H, G and P are compared with the sum and
// carry of a one-bit addition (H = low bit of a+b, G = carry of a+b,
// P = carry of a+b+1).
module tb_preproc_cell;
  import rpdt_pkg::*;

  int   checks = 0, failures = 0;
  logic a, b, h;
  gp_t  gp;

  preproc_cell dut (.a, .b, .h, .gp);

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b got %0b expected %0b", what, a, b, got, exp);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int unsigned s0, s1;
      {a, b} = 2'(v);
      #1;
      s0 = 32'(a) + 32'(b);
      s1 = 32'(a) + 32'(b) + 1;
      check("H", h,    s0[0]);
      check("G", gp.g, s0[1]);
      check("P", gp.p, s1[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
