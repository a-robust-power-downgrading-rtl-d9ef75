// tb_cs_block: exhaustive check of the 4-bit carry-select block.
// For every pair of 4-bit operands and both carry-ins, the block is fed the
// per-bit H, G, P of the operands and must return the low four bits of
// a + b + cin, computed by integer addition.
module tb_cs_block;
  import rpdt_pkg::*;

  localparam int unsigned W = 4;

  int           checks = 0, failures = 0;
  logic [W-1:0] h, s;
  gp_t  [W-1:0] gp;
  logic         cin;

  cs_block #(.W(W)) dut (.h, .gp, .cin, .s);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << W); a++)
      for (int b = 0; b < (1 << W); b++)
        for (int c = 0; c < 2; c++) begin
          logic [W-1:0] av, bv, exp;
          av = W'(a); bv = W'(b);
          for (int k = 0; k < W; k++) begin
            h[k]    = av[k] ^ bv[k];
            gp[k].g = av[k] & bv[k];
            gp[k].p = av[k] | bv[k];
          end
          cin = 1'(c);
          exp = W'(a + b + c);
          #1;
          checks++;
          if (s !== exp) begin
            failures++;
            $display("FAIL a=%h b=%h cin=%0d s=%h expected %h", a, b, c, s, exp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
