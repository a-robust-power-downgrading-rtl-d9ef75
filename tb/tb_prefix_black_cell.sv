// tb_prefix_black_cell: exhaustive check of the black prefix operator.
// Each (G, P) pair is treated as the carry function of a group of bits
// (carry-out = 1 if G, else the carry-in if P, else 0). For every pair of
// high and low groups and both carry-ins, the output group must give the
// same carry-out as the low group followed by the high group.
module tb_prefix_black_cell;
  import rpdt_pkg::*;

  int  checks = 0, failures = 0;
  gp_t hi, lo, o;

  prefix_black_cell dut (.hi, .lo, .o);

  // carry out of a group with (G, P) for a given carry-in
  function automatic logic carry(gp_t x, logic cin);
    if (x.g)      return 1'b1;
    else if (cin) return x.p;
    else          return 1'b0;
  endfunction

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {hi, lo} = 4'(v);
      #1;
      for (int cin = 0; cin < 2; cin++) begin
        logic exp;
        exp = carry(hi, carry(lo, 1'(cin)));
        checks++;
        if (carry(o, 1'(cin)) !== exp) begin
          failures++;
          $display("FAIL hi=%p lo=%p cin=%0d o=%p", hi, lo, cin, o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
