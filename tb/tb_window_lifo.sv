// tb_window_lifo -- pushes a stream of windows while popping the previous
// ones, and checks that every window comes out newest entry first, that
// 'ready' tracks complete windows, that a push into a bank still holding
// an unpopped window is refused with 'overflow', and that a pop without a
// complete window gives 'underflow'. Runs with W = 5 and W = 60. A second
// instance with three banks must accept a write-back that lags the reads
// by a whole window.
module tb_window_lifo;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, pop = 0;
  logic [5:0]  win_len;
  logic [17:0] push_data, pop_data;
  logic ready, overflow, underflow;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0;

  window_lifo #(.DEPTH(60), .DW(18)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .win_len(win_len), .push(push),
    .push_data(push_data), .pop(pop), .pop_data(pop_data), .ready(ready),
    .overflow(overflow), .underflow(underflow));

  // three-bank instance
  logic        push3 = 0, pop3 = 0;
  logic [17:0] push3_data = 0, pop3_data;
  logic        ready3, overflow3, underflow3;

  window_lifo #(.DEPTH(60), .DW(18), .NBANK(3)) dut3 (
    .clk(clk), .rst_n(rst_n), .clear(clear), .win_len(win_len), .push(push3),
    .push_data(push3_data), .pop(pop3), .pop_data(pop3_data), .ready(ready3),
    .overflow(overflow3), .underflow(underflow3));

  // Continuous pushes of nwin windows; popping of window w starts only when
  // window w+2 starts to be pushed.
  task automatic run3(int w_len, int nwin);
    int pw, pe, rw, re, t;
    win_len = 6'(w_len);
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    pw = 0; pe = 0; rw = 0; re = w_len - 1; t = 0;
    while (rw < nwin) begin
      push3 = (pw < nwin);
      push3_data = 18'(pw * 64 + pe);
      pop3 = (t >= 2 * w_len);
      #1;
      checks++;
      if (overflow3 || underflow3 || (pop3 && int'(pop3_data) != rw * 64 + re)) begin
        failures++;
        if (failures < 10) $display("FAIL 3 banks: t=%0d pop %0d exp %0d", t, pop3_data, rw * 64 + re);
      end
      @(negedge clk);
      t++;
      if (push3) begin
        pe++;
        if (pe == w_len) begin pe = 0; pw++; end
      end
      if (pop3) begin
        if (re == 0) begin re = w_len - 1; rw++; end
        else re--;
      end
    end
    push3 = 0; pop3 = 0;
  endtask

  always #5 clk = !clk;
  always @(negedge clk) begin
    if (overflow)  n_ovf++;
    if (underflow) n_unf++;
  end

  // Window w, entry e carries w*64 + e.
  task automatic run(int w_len, int nwin);
    int pw, pe, rw, re;
    win_len = 6'(w_len);
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    // underflow: nothing complete yet
    pop = 1;
    #1; checks++; if (!underflow || ready) failures++;
    @(negedge clk); pop = 0;
    pw = 0; pe = 0; rw = 0; re = w_len - 1;
    // push window 0 alone, then push window w+1 while popping window w
    while (rw < nwin) begin
      push = (pw < nwin);
      push_data = 18'(pw * 64 + pe);
      pop = ready;
      #1;
      if (pop) begin
        checks++;
        if (int'(pop_data) != rw * 64 + re) begin
          failures++;
          if (failures < 10) $display("FAIL W=%0d pop %0d exp %0d", w_len, pop_data, rw * 64 + re);
        end
      end
      checks++;
      if (overflow || underflow) failures++;
      @(negedge clk);
      if (push) begin
        pe++;
        if (pe == w_len) begin pe = 0; pw++; end
      end
      if (pop) begin
        if (re == 0) begin re = w_len - 1; rw++; end
        else re--;
      end
    end
    push = 0; pop = 0;
    checks++;
    if (ready) failures++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(5, 6);
    run(60, 4);
    run3(7, 5);
    // overflow: fill both banks, a third window is refused
    win_len = 6'd3;
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    for (int e = 0; e < 6; e++) begin
      push = 1; push_data = 18'(100 + e);
      @(negedge clk);
    end
    push = 1; push_data = 18'd999;
    #1; checks++; if (!overflow) failures++;
    @(negedge clk); push = 0;
    for (int e = 0; e < 6; e++) begin
      pop = 1;
      #1; checks++;
      // bank 0 first (102,101,100), then bank 1 (105,104,103)
      if (int'(pop_data) != (e < 3 ? 102 - e : 108 - e)) failures++;
      @(negedge clk);
    end
    pop = 0;
    checks++;
    if (n_ovf != 1 || n_unf != 2) begin
      failures++;
      $display("FAIL overflow %0d underflow %0d events", n_ovf, n_unf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
