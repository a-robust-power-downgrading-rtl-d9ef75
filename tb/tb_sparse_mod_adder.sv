// tb_sparse_mod_adder: checks the sparse-4 modulo 2^N+1 diminished-1 adder.
//
// Two instances are tested: the default N = 16 and a small N = 8 one (which
// is checked exhaustively). Expected values come from integer arithmetic:
//   S* = (A* + B* + 1) mod 2^N if A* + B* < 2^N, else (A* + B*) mod 2^N,
//   cout = (A* + B* >= 2^N).
// For N = 16 the sum is also checked in the modular sense: with X = A*+1 and
// Y = B*+1, S* + 1 must equal (X + Y) mod (2^N + 1) whenever that is not 0.
// Directed corner cases (all zeros, all ones, carry chains across every CS
// block boundary) are followed by random operands.
module tb_sparse_mod_adder;

  int checks = 0, failures = 0;

  logic [15:0] a16, b16, s16;
  logic        c16;
  logic [7:0]  a8, b8, s8;
  logic        c8;

  sparse_mod_adder                dut16 (.a(a16), .b(b16), .s(s16), .cout(c16));
  sparse_mod_adder #(.N(8))       dut8  (.a(a8),  .b(b8),  .s(s8),  .cout(c8));

  function automatic longint unsigned dim1_sum(longint unsigned a, longint unsigned b, int n);
    longint unsigned m = 64'd1 << n;
    if (a + b < m) return (a + b + 1) % m;
    else           return (a + b) % m;
  endfunction

  task automatic check16(logic [15:0] a, logic [15:0] b);
    longint unsigned exp_s, x, y, r;
    logic            exp_c;
    a16 = a; b16 = b;
    #1;
    exp_s = dim1_sum(64'(a), 64'(b), 16);
    exp_c = (64'(a) + 64'(b)) >= 64'd65536;
    checks++;
    if (s16 !== 16'(exp_s) || c16 !== exp_c) begin
      failures++;
      $display("FAIL N=16 a=%h b=%h s=%h c=%0b expected s=%h c=%0b", a, b, s16, c16, exp_s, exp_c);
    end
    x = 64'(a) + 1; y = 64'(b) + 1;
    r = (x + y) % 65537;
    if (r != 0) begin
      checks++;
      if (64'(s16) + 1 != r) begin
        failures++;
        $display("FAIL modular N=16 a=%h b=%h s=%h", a, b, s16);
      end
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // N = 8, exhaustive
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        longint unsigned exp_s;
        a8 = 8'(a); b8 = 8'(b);
        #1;
        exp_s = dim1_sum(64'(a), 64'(b), 8);
        checks++;
        if (s8 !== 8'(exp_s) || c8 !== 1'((a + b) >= 256)) begin
          failures++;
          $display("FAIL N=8 a=%h b=%h s=%h c=%0b expected %h", a, b, s8, c8, exp_s);
        end
      end
    // N = 16, directed
    check16(16'h0000, 16'h0000);
    check16(16'hffff, 16'hffff);
    check16(16'hffff, 16'h0000);
    check16(16'hffff, 16'h0001);
    check16(16'h8000, 16'h8000);
    check16(16'h7fff, 16'h8000);
    for (int k = 0; k < 16; k++) begin
      check16(16'((1 << k) - 1), 16'(1 << (k)));     // carry stops at bit k
      check16(16'hffff >> k, 16'h0001);              // long propagate runs
      check16(16'((32'hffff << k)), 16'((1 << k)));  // carry from bit k out
    end
    // N = 16, random
    for (int n = 0; n < 200000; n++) check16(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
