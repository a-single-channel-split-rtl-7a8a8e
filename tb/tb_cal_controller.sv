// tb_cal_controller: runs the controller with N = 40, L = 8 for many
// intervals under four CR patterns (CR high at once, CR arriving later, CR
// only after the acceptance window, CR never) and checks every output in
// every cycle against a position-based model: RESET on the last sample of
// each interval, no request during the first L samples, the desired sample
// at the first CR = 1 in positions L..N-2-L, SEL and k = 0..L over the
// desired sample and the L after it, and the stage rotating 5,4,3,2,1.
// A second instance with CONCURRENT = 1 sees the same CR timing on a random
// nonzero set of stages (all zero before): it must request every stage in
// the window and take the first sample where any stage has CR = 1.
`timescale 1ns/1ps
module tb_cal_controller;
  localparam int N = 40, L = 8, NS = 5;
  localparam int KW = $clog2(L + 1);
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NS-1:0] cr, cal_req;
  logic [2:0] stage;
  logic desired, sel, reset;
  logic [KW-1:0] k;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_wait = 0;

  logic [NS-1:0] cr_c, cal_req_c;
  logic [2:0] stage_c;
  logic desired_c, sel_c, reset_c;
  logic [KW-1:0] k_c;

  cal_controller #(.N(N), .L(L), .NS(NS)) dut (.*);
  cal_controller #(.N(N), .L(L), .NS(NS), .CONCURRENT(1'b1)) dut_c (
    .clk, .rst_n, .cr(cr_c), .cal_req(cal_req_c), .stage(stage_c), .desired(desired_c),
    .sel(sel_c), .k(k_c), .reset(reset_c)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what, int p);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("pos %0d: %s", p, what);
    end
  endtask

  initial begin
    int p, st, t0, pattern, cr_from;
    bit found;
    logic [NS-1:0] exp_req;
    logic exp_des, exp_sel, exp_post;
    int exp_k;
    cr = '0;
    cr_c = '0;
    repeat (2) @(posedge clk);
    #2 rst_n = 1'b1;
    st = NS - 1;
    for (int iv = 0; iv < 200; iv++) begin
      pattern = iv % 4;
      cr_from = (pattern == 0) ? 0 : (pattern == 1) ? L + 3 + (iv % 7) : (pattern == 2) ? N - 1 - L : N;
      found = 0;
      t0 = -1;
      for (p = 0; p < N; p++) begin
        // CR of the calibrated stage follows the pattern; other stages toggle
        cr = NS'($urandom);
        cr[st] = (p >= cr_from) && (pattern != 3);
        cr_c = '0;
        if (p >= cr_from && pattern != 3)
          while (cr_c == '0) cr_c = NS'($urandom);
        #1;
        exp_req  = '0;
        exp_des  = 0;
        if (!found && p >= L && p <= N - 2 - L) begin
          exp_req[st] = 1'b1;
          exp_des = cr[st];
        end
        exp_post = found && p > t0 && p <= t0 + L;
        exp_sel  = exp_des || exp_post;
        exp_k    = exp_post ? p - t0 : 0;
        chk(reset === (p == N - 1), "reset", p);
        chk(cal_req === exp_req, "cal_req", p);
        chk(desired === exp_des, "desired", p);
        chk(sel === exp_sel, "sel", p);
        chk(int'(k) == exp_k, "k", p);
        chk(int'(stage) == st, "stage", p);
        chk(reset_c === (p == N - 1), "concurrent reset", p);
        chk(cal_req_c === ((exp_req != '0) ? {NS{1'b1}} : '0), "concurrent cal_req", p);
        chk(desired_c === exp_des, "concurrent desired", p);
        chk(sel_c === exp_sel, "concurrent sel", p);
        chk(int'(k_c) == exp_k, "concurrent k", p);
        if (exp_des) begin
          found = 1; t0 = p; n_hit++;
          if (p > L) n_wait++;
        end
        @(posedge clk);
        #1;
      end
      if (!found) n_miss++;
      st = (st == 0) ? NS - 1 : st - 1;
    end
    chk(n_hit > 0 && n_miss > 0 && n_wait > 0, "not every case occurred", 0);
    $display("hits %0d misses %0d waits %0d", n_hit, n_miss, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
