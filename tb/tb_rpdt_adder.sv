// tb_rpdt_adder: end-to-end test of the 24-bit RPDT adder at its default
// sizes (8-bit MSP, 16-bit LSP).
//
// Reference model (integer arithmetic, independent of the RTL structure):
//   c    = (A[15:0] + B[15:0] >= 2^16)
//   S_lo = A[15:0] + B[15:0] + (not c)      mod 2^16  (diminished-1 mod 2^16+1)
//   S_hi = A[23:16] + B[23:16] + c          mod 2^8,  cout = its carry
// Protocol: new operands are applied away from the close_clk edge; the
// result is compared after the next rising edge, together with the
// registered decision (close, sign, carr-ctrl). When the new operands need
// the same decision as the one held, the result is also compared before
// that edge: then no wait for the detection logic is needed.
//
// Phases: reset; the five MSP situations of the spurious-transition
// analysis (operands whose upper bytes are those of the analysis, with the
// LSP operands chosen to give the same carry), whose MSP bytes are also
// compared with the results printed there; then random operands biased
// towards sign-extension upper parts. Counted and required to occur: MSP
// closed for each operand class and carry, MSP open, both mode switches,
// results taken with the decision unchanged and no edge, LSP end-around
// correction (+1) applied and not applied.
module tb_rpdt_adder;

  int          checks = 0, failures = 0;
  logic        close_clk = 0, rst_n = 1;
  logic [23:0] a = '0, b = '0, sum;
  logic        cout, c_lsp, close, sign, carr_ctrl;

  // mechanism counters
  int n_open = 0, n_to_closed = 0, n_to_open = 0, n_held = 0;
  int n_corr = 0, n_nocorr = 0;
  int closed_class [6];
  logic prev_close = 1'b1;

  rpdt_adder dut (.*);

  always #5 close_clk = ~close_clk;

  function automatic logic [24:0] ref_sum(logic [23:0] x, logic [23:0] y);
    logic [16:0] lo;
    logic [8:0]  hi;
    logic        c;
    lo = {1'b0, x[15:0]} + {1'b0, y[15:0]};
    c  = lo[16];
    lo = lo + 17'(!c);
    hi = {1'b0, x[23:16]} + {1'b0, y[23:16]} + 9'(c);
    return {hi, lo[15:0]};
  endfunction

  task automatic compare(string when);
    logic [24:0] e;
    e = ref_sum(a, b);
    checks++;
    if ({cout, sum} !== e) begin
      failures++;
      $display("FAIL %s a=%h b=%h got %0b,%h expected %0b,%h close=%0b",
               when, a, b, cout, sum, e[24], e[23:0], close);
    end
  endtask

  // apply operands at the falling edge, compare after the rising edge
  task automatic step(logic [23:0] x, logic [23:0] y);
    logic        e_close, e_sign, e_carr;
    logic [24:0] e;
    @(negedge close_clk);
    a = x; b = y;
    #1;
    e       = ref_sum(x, y);
    e_close = !((x[23:16] == 8'h00 || x[23:16] == 8'hff) &&
                (y[23:16] == 8'h00 || y[23:16] == 8'hff));
    e_sign  = !e_close && e[23];
    e_carr  = !e_close && e[16];
    if ({e_close, e_sign, e_carr} == {close, sign, carr_ctrl}) begin
      compare("mode held, before edge");
      n_held++;
    end
    @(posedge close_clk);
    #1;
    compare("after edge");
    checks++;
    if ({close, sign, carr_ctrl} !== {e_close, e_sign, e_carr}) begin
      failures++;
      $display("FAIL decision %0b%0b%0b expected %0b%0b%0b for a=%h b=%h",
               close, sign, carr_ctrl, e_close, e_sign, e_carr, a, b);
    end
    if (close) n_open++;
    else closed_class[(int'(x[23:16] == 8'hff) + int'(y[23:16] == 8'hff)) * 2 + int'(c_lsp)]++;
    if (prev_close && !close) n_to_closed++;
    if (!prev_close && close) n_to_open++;
    prev_close = close;
    if (c_lsp) n_nocorr++; else n_corr++;
  endtask

  // operands of one case of the analysis: 16-bit numbers split at bit 8,
  // the upper byte placed in the MSP and the lower byte at the top of the
  // LSP (so that the LSP carry equals the analysis' carry C7)
  task automatic fig_case(logic [15:0] x16, logic [15:0] y16, logic [7:0] exp_hi);
    step({x16, 8'h00}, {y16, 8'h00});
    checks++;
    if (sum[23:16] !== exp_hi) begin
      failures++;
      $display("FAIL case %h+%h: MSP byte %h expected %h", x16, y16, sum[23:16], exp_hi);
    end
  endtask

  function automatic logic [7:0] pick();
    case ($urandom_range(3))
      0:       return 8'h00;
      1:       return 8'hff;
      default: return 8'($urandom);
    endcase
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge close_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #1;
    checks++;
    if (close !== 1'b1) begin
      failures++;
      $display("FAIL reset does not open the MSP");
    end
    #10 rst_n = 1;

    // the five situations of the analysis (results as printed there)
    fig_case(16'd128,        16'd64,         8'h00);  // case 1, before
    fig_case(16'hff80,       16'd192,        8'h00);  // case 1: -128 + 192
    fig_case(16'hffc3,       16'd51,         8'hff);  // case 2: -61 + 51
    fig_case(16'hff3c,       16'd204,        8'h00);  // case 3: -196 + 204
    fig_case(16'hffc3,       16'hff33,       8'hfe);  // case 4: -61 + -205
    fig_case(16'hff3c,       16'hffcc,       8'hff);  // case 5: -196 + -52

    // directed corners
    step(24'h000000, 24'h000000);
    step(24'hffffff, 24'hffffff);
    step(24'h7fffff, 24'h000001);
    step(24'h00ffff, 24'h000001);
    step(24'hff0000, 24'h00ffff);

    // random, biased to sign-extension upper parts
    for (int n = 0; n < 100000; n++)
      step({pick(), 16'($urandom)}, {pick(), 16'($urandom)});

    $display("open=%0d open->closed=%0d closed->open=%0d held=%0d corr=%0d nocorr=%0d closed=%p",
             n_open, n_to_closed, n_to_open, n_held, n_corr, n_nocorr, closed_class);
    checks += 6;
    if (n_open == 0)      begin failures++; $display("FAIL MSP never open");          end
    if (n_to_closed == 0) begin failures++; $display("FAIL never switched off");      end
    if (n_to_open == 0)   begin failures++; $display("FAIL never switched on");       end
    if (n_held == 0)      begin failures++; $display("FAIL mode never held");         end
    if (n_corr == 0)      begin failures++; $display("FAIL no end-around +1");        end
    if (n_nocorr == 0)    begin failures++; $display("FAIL no LSP carry-out");        end
    foreach (closed_class[i]) begin
      checks++;
      if (closed_class[i] == 0) begin
        failures++;
        $display("FAIL closed class %0d never seen", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
