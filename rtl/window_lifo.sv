// window_lifo -- last-in first-out store of the read addresses, one
// sliding window at a time.
//
// The SISOs return the extrinsic information of a window in the reverse
// order of reading, so the address set {adx, idx^0..idx^3} used to read
// time j must be replayed backwards when the results are written. Entries
// are pushed in reading order; a window is 'win_len' entries. The store
// has NBANK banks of DEPTH entries used round robin: while one window is
// being popped (newest entry first) the next one is pushed into another
// bank. With the defaults (two banks of 60 entries, the largest window,
// 18-bit entries) the store holds 2160 bits, the published LIFO size.
// Storing the read addresses in a LIFO follows the published architecture;
// the banked organisation, the ready/overflow/underflow signals and the
// same-cycle bank reuse are this design's own.
//
// Interface: 'push' writes push_data into the current write bank; after
// win_len pushes that bank is complete and the next bank is used. 'pop'
// returns, combinationally on pop_data, the newest not yet popped entry of
// the oldest complete window; 'ready' says a complete window is available.
// A bank can be pushed again in the cycle in which its last entry is
// popped. 'overflow' pulses when a push hits a bank whose window has not
// been popped (the entry is dropped); 'underflow' pulses on a pop without
// a complete window. With two banks this means the writes of window w must
// end no later than the first read of window w+2. 'clear' empties all
// banks. win_len must stay constant between clears and lie in 1..DEPTH.
module window_lifo #(
  parameter int DEPTH = 60,
  parameter int DW    = 18,
  parameter int NBANK = 2,
  parameter int LW    = $clog2(DEPTH + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic [LW-1:0]  win_len,
  input  logic           push,
  input  logic [DW-1:0]  push_data,
  input  logic           pop,
  output logic [DW-1:0]  pop_data,
  output logic           ready,
  output logic           overflow,
  output logic           underflow
);

  localparam int AW = $clog2(DEPTH);
  localparam int BW = (NBANK > 1) ? $clog2(NBANK) : 1;

  logic [DW-1:0]    mem [NBANK][DEPTH];
  logic [NBANK-1:0] full;           // bank holds a complete, unpopped window
  logic [BW-1:0]    wbank, rbank;
  logic [AW-1:0]    wptr;           // next entry to push
  logic [AW-1:0]    rptr;           // next entry to pop (counts down)
  logic             do_push, do_pop;
  logic             push_end, pop_end;
  logic             wbank_free;

  function automatic logic [BW-1:0] next_bank(logic [BW-1:0] b);
    return (int'(b) == NBANK - 1) ? '0 : b + 1'b1;
  endfunction

  assign ready      = full[rbank];
  assign do_pop     = pop && full[rbank];
  assign pop_end    = do_pop && rptr == '0;
  assign wbank_free = !full[wbank] || (pop_end && rbank == wbank);
  assign do_push    = push && wbank_free;
  assign push_end   = do_push && LW'(wptr) == win_len - 1'b1;
  assign pop_data   = mem[rbank][rptr];
  assign overflow   = push && !wbank_free;
  assign underflow  = pop && !full[rbank];

  always_ff @(posedge clk) begin
    if (do_push)
      mem[wbank][wptr] <= push_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full  <= '0;
      wbank <= '0;
      rbank <= '0;
      wptr  <= '0;
      rptr  <= '0;
    end else if (clear) begin
      full  <= '0;
      wbank <= '0;
      rbank <= '0;
      wptr  <= '0;
      rptr  <= '0;
    end else begin
      if (do_push) begin
        if (push_end) begin
          wptr  <= '0;
          wbank <= next_bank(wbank);
        end else begin
          wptr <= wptr + 1'b1;
        end
      end
      if (pop_end)
        rbank <= next_bank(rbank);
      // A window becoming ready starts popping at its newest entry.
      if (pop_end || !full[rbank])
        rptr <= AW'(win_len - 1'b1);
      else if (do_pop)
        rptr <= rptr - 1'b1;
      // Bank state: completed by its last push, freed by its last pop.
      for (int b = 0; b < NBANK; b++) begin
        if (push_end && int'(wbank) == b)
          full[b] <= 1'b1;
        else if (pop_end && int'(rbank) == b)
          full[b] <= 1'b0;
      end
    end
  end

endmodule
