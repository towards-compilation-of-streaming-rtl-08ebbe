// fir_window_kernel: the shift-register kernel of the FIR filter.
//
// Each incoming sample x[n] is inserted into a TAPS-entry shift register,
// kept as a circular buffer in a small memory (a write pointer moves instead
// of the data). After each insertion the kernel emits the filter's current
// window x[n], x[n-1], ..., x[n-TAPS+1] as TAPS consecutive stream elements,
// newest first; samples before the start of the stream read as 0. The
// downstream mul kernel multiplies the window by the coefficients and the
// sum kernel (run length TAPS) adds the products into the filter output
// y[n] = sum_k h[k] * x[n-k].
//
// Replication: with LANES > 1 whole windows are dealt out round-robin,
// window n going to lane n mod LANES, so every replicated mul/sum branch
// computes complete outputs. The kernel itself is not replicated: every
// window needs all TAPS newest samples, so this one kernel emits every
// window element and bounds the throughput of the replicated filter.
//
// The circular buffer and the round-robin dealing follow the design; the
// window-as-a-stream encoding, the zero history and the timing are this
// design's own choices.
//
// Timing: one window element per clock cycle, so one sample every TAPS
// cycles; the next sample is taken in the cycle the last element of the
// previous window leaves. Interface: in_valid/in_ready/in_data (samples),
// out_valid[l]/out_ready[l]/out_data[l] (windows for lane l); start clears
// the history and the lane turn; rst_n is synchronous, active low.
module fir_window_kernel
  import stream_pkg::*;
#(
  parameter int unsigned TAPS  = 8,
  parameter int unsigned LANES = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             in_valid,
  output logic             in_ready,
  input  word_t            in_data,
  output logic [LANES-1:0] out_valid,
  input  logic [LANES-1:0] out_ready,
  output word_t            out_data [LANES]
);

  localparam int unsigned TAP_W  = (TAPS > 1) ? $clog2(TAPS) : 1;
  localparam int unsigned FILL_W = $clog2(TAPS + 1);
  localparam int unsigned LANE_W = (LANES > 1) ? $clog2(LANES) : 1;

  word_t             shreg [TAPS];   // circular buffer of the newest samples
  logic [TAP_W-1:0]  wr_ptr;         // slot the next sample is written to
  logic [TAP_W-1:0]  rd_ptr;         // slot of the element being emitted
  logic [TAP_W-1:0]  k;              // position of that element in the window
  logic [FILL_W-1:0] filled;         // samples held (saturates at TAPS)
  logic [LANE_W-1:0] turn;           // lane receiving the current window
  logic              emitting;
  logic              sent, last_sent, load;
  word_t             elem;

  function automatic logic [TAP_W-1:0] dec(input logic [TAP_W-1:0] p);
    return (p == '0) ? TAP_W'(TAPS - 1) : p - 1'b1;
  endfunction

  function automatic logic [TAP_W-1:0] inc(input logic [TAP_W-1:0] p);
    return (p == TAP_W'(TAPS - 1)) ? '0 : p + 1'b1;
  endfunction

  assign elem      = (FILL_W'(k) < filled) ? shreg[rd_ptr] : '0;
  assign sent      = emitting && out_ready[turn];
  assign last_sent = sent && (k == TAP_W'(TAPS - 1));
  assign in_ready  = !start && (!emitting || last_sent);
  assign load      = in_valid && in_ready;

  always_comb begin
    out_valid = '0;
    out_valid[turn] = emitting;
    for (int l = 0; l < LANES; l++) out_data[l] = elem;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      k        <= '0;
      filled   <= '0;
      turn     <= '0;
      emitting <= 1'b0;
    end else if (start) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      k        <= '0;
      filled   <= '0;
      turn     <= '0;
      emitting <= 1'b0;
    end else begin
      if (sent) begin
        k      <= k + 1'b1;
        rd_ptr <= dec(rd_ptr);
      end
      if (last_sent) begin
        emitting <= 1'b0;
        turn     <= (turn == LANE_W'(LANES - 1)) ? '0 : turn + 1'b1;
      end
      if (load) begin
        // The new sample is the newest element of the next window.
        wr_ptr   <= inc(wr_ptr);
        rd_ptr   <= wr_ptr;
        k        <= '0;
        emitting <= 1'b1;
        if (filled != FILL_W'(TAPS)) filled <= filled + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (load) shreg[wr_ptr] <= in_data;
  end

endmodule
