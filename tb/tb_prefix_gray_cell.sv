// tb_prefix_gray_cell: check of the modulo 2^n+1 carry operator.
// Real 8-bit operand pairs are split at a random bit i; the lower group
// (bits i..0) gives v, the upper group (bits 7..i+1) gives the inverted
// generate. The expected carry is that out of bit i when the 8-bit sum is
// taken with the inverted end-around carry, i.e. carry-in = not(carry-out
// of a+b), computed by plain integer addition.
module tb_prefix_gray_cell;
  import rpdt_pkg::*;

  int   checks = 0, failures = 0;
  gp_t  v;
  logic gl_n, c;

  prefix_gray_cell dut (.v, .gl_n, .c);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int unsigned a, b, i, lo_mask, cin, exp, lo_a, lo_b, hi_a, hi_b;
      a = $urandom_range(255);
      b = $urandom_range(255);
      i = $urandom_range(6);                   // split: low group i..0
      lo_mask = (1 << (i + 1)) - 1;
      cin = ((a + b) >> 8) & 1;
      cin = cin ^ 1;                           // inverted end-around carry
      lo_a = a & lo_mask;  lo_b = b & lo_mask;
      hi_a = a >> (i + 1); hi_b = b >> (i + 1);
      // group generate/propagate from integer sums
      v.g  = 1'(((lo_a + lo_b) >> (i + 1)) & 1);
      v.p  = 1'(((lo_a + lo_b + 1) >> (i + 1)) & 1);
      gl_n = ~1'(((hi_a + hi_b) >> (7 - i)) & 1);
      exp  = ((lo_a + lo_b + cin) >> (i + 1)) & 1;
      #1;
      checks++;
      if (c !== 1'(exp)) begin
        failures++;
        $display("FAIL a=%h b=%h i=%0d c=%0b expected %0b", a, b, i, c, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
