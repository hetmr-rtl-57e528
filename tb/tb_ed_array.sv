// tb_ed_array: self-checking test of the string distance array in both
// modes. Random string pairs (lengths 0..STRLEN, four-letter alphabet, plus
// identical and empty pairs) are injected one character every two cycles;
// the result, sampled exactly STRLEN+2 cycles after the last injection, is
// compared with a row-by-row dynamic-programming model. A few pairs are fed
// with random stall cycles (en low) between injections.
`timescale 1ns/1ps
module tb_ed_array;
  import hetmr_pkg::*;
  import ed_ref_pkg::*;

  localparam int STRLEN = 8;
  localparam int LW = $clog2(STRLEN + 1);

  logic clk = 0, rst_n = 1;
  // a falling edge at 1 ns applies the asynchronous reset before the first clock
  initial #1 rst_n = 0;
  logic clear, en, inject;
  logic [7:0] s_char, t_char;
  logic [LW-1:0] s_len, t_len;
  logic signed [15:0] res_lev, res_sw;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ed_array #(.STRLEN(STRLEN), .MODE(DIST_LEV)) u_lev (
    .clk, .rst_n, .clear, .en, .inject, .s_char, .t_char, .s_len, .t_len, .result(res_lev));
  ed_array #(.STRLEN(STRLEN), .MODE(DIST_SW)) u_sw (
    .clk, .rst_n, .clear, .en, .inject, .s_char, .t_char, .s_len, .t_len, .result(res_sw));

  task automatic run_pair(input str_t s, input str_t t, input bit stalls);
    int e_lev, e_sw;
    @(negedge clk);
    clear = 1; en = 1; inject = 0; s_char = 0; t_char = 0;
    s_len = LW'(s.size()); t_len = LW'(t.size());
    @(negedge clk);
    clear = 0;
    for (int k = 0; k < STRLEN; k++) begin
      if (stalls) repeat ($urandom_range(2, 0)) begin
        en = 0; inject = 1; s_char = 8'h7a; t_char = 8'h7a;  // ignored while en is low
        @(negedge clk);
      end
      en = 1; inject = 1;
      s_char = (k < s.size()) ? s[k] : 8'h00;
      t_char = (k < t.size()) ? t[k] : 8'h00;
      @(negedge clk);
      inject = 0; s_char = 0; t_char = 0;
      @(negedge clk);
    end
    // last injection was two cycles ago; wait the documented latency
    repeat (STRLEN + 2 - 1) @(negedge clk);
    e_lev = lev(s, t);
    e_sw  = sw(s, t);
    checks += 2;
    if (res_lev != e_lev) begin
      failures++;
      $display("LEV mismatch: got %0d expected %0d (ls=%0d lt=%0d)", res_lev, e_lev, s.size(), t.size());
    end
    if (res_sw != e_sw) begin
      failures++;
      $display("SW mismatch: got %0d expected %0d", res_sw, e_sw);
    end
  endtask

  initial begin
    clear = 0; en = 1; inject = 0; s_char = 0; t_char = 0; s_len = 0; t_len = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    begin
      str_t a, b;
      a = new[STRLEN]; foreach (a[k]) a[k] = 8'h61 + 8'(k);
      run_pair(a, a, 0);                     // identical, full length
      b = new[0];
      run_pair(a, b, 0);                     // against empty string
      run_pair(b, a, 0);
      for (int n = 0; n < 300; n++) begin
        a = rand_str(STRLEN, 4);
        b = rand_str(STRLEN, 4);
        run_pair(a, b, n % 5 == 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
