// fir_system: the FIR filter application built as a pipeline of stream
// kernels joined by FIFOs (create1 -> window -> mul -> sum -> write, with
// create2 supplying the coefficients).
//
// It filters the on-chip test signal x[n] = n, n in [0, N), with TAPS taps:
//     y[n] = sum_{k=0}^{TAPS-1} h[k] * x[n-k],   h[k] = k + 1,  x[<0] = 0
// (mod 2^32). create1 streams the samples into the window kernel, which
// keeps the shift register as a circular buffer and emits each window of
// TAPS samples. create2 streams the matching coefficients h[0..TAPS-1] once
// per output. mul forms the products, sum adds each run of TAPS products
// into y[n], and write stores y[0..N-1] at consecutive words from BASE.
//
// Replication (LANES > 1): mul and sum are instantiated LANES times, each
// branch with its own FIFOs; the window kernel deals whole windows out
// round-robin (window n to branch n mod LANES) and the write kernel reads
// the branches in the same order, so y[] is stored in order. The window
// kernel is a single instance and emits one window element per cycle, so it
// bounds the filter's throughput at one output every TAPS cycles whatever
// LANES is: the shift register is the part that does not replicate.
//
// The pipeline, the circular-buffer shift register, FIFO depth 4 and the
// round-robin dealing follow the design; the test signal, the coefficients
// and the split of the filter into window, mul and sum kernels are this
// design's own choices.
//
// Interface: start/busy/finished/cycles from the controller, a write-only
// memory master (mem_*) and the count of results written.
module fir_system
  import stream_pkg::*;
#(
  parameter int unsigned N     = 100000,
  parameter int unsigned TAPS  = 8,
  parameter int unsigned LANES = 1,
  parameter logic [ADDR_W-1:0] BASE = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              finished,
  output logic [31:0]       cycles,
  output logic              mem_write,
  output logic [ADDR_W-1:0] mem_address,
  output word_t             mem_writedata,
  input  logic              mem_waitrequest,
  output logic [31:0]       words_written
);

  logic go, app_done, c1_done, c2_done, wr_done;

  // create1 -> sample FIFO -> window kernel
  logic             x_valid, x_ready, xs_valid, xs_ready;
  word_t            x_data, xs_data;
  logic [0:0]       c1_valid, c1_ready;
  word_t            c1_data [1];
  // window kernel -> window FIFOs -> mul
  logic [LANES-1:0] w_valid, w_ready, ws_valid, ws_ready;
  word_t            w_data  [LANES];
  word_t            ws_data [LANES];
  // create2 -> coefficient FIFOs -> mul
  logic [LANES-1:0] h_valid, h_ready, hs_valid, hs_ready;
  word_t            h_data  [LANES];
  word_t            hs_data [LANES];
  // mul -> mul_result FIFO -> sum -> reduce_result FIFO -> write
  logic [LANES-1:0] m_valid, m_ready, mr_valid, mr_ready;
  word_t            m_data  [LANES];
  word_t            mr_data [LANES];
  logic [LANES-1:0] r_valid, r_ready, rr_valid, rr_ready;
  word_t            r_data  [LANES];
  word_t            rr_data [LANES];

  stream_ctrl u_ctrl (
    .clk, .rst_n, .start,
    .kernel_go (go),
    .app_done  (app_done),
    .busy, .finished, .cycles
  );

  assign app_done = wr_done && c1_done && c2_done;

  // Samples x[n] = n.
  create_kernel #(
    .LANES(1), .INNER(N), .OUTER(1),
    .START(0), .INNER_STEP(1), .OUTER_STEP(0), .SPLIT_OUTER(1'b0)
  ) u_create1 (
    .clk, .rst_n, .start(go),
    .out_valid(c1_valid), .out_ready(c1_ready), .out_data(c1_data),
    .done(c1_done)
  );
  assign x_valid     = c1_valid[0];
  assign c1_ready[0] = x_ready;
  assign x_data      = c1_data[0];

  stream_fifo u_samples (
    .clk, .rst_n,
    .in_valid(x_valid), .in_ready(x_ready), .in_data(x_data),
    .out_valid(xs_valid), .out_ready(xs_ready), .out_data(xs_data)
  );

  fir_window_kernel #(.TAPS(TAPS), .LANES(LANES)) u_window (
    .clk, .rst_n, .start(go),
    .in_valid(xs_valid), .in_ready(xs_ready), .in_data(xs_data),
    .out_valid(w_valid), .out_ready(w_ready), .out_data(w_data)
  );

  // Coefficients h[k] = k + 1, one set per output, whole sets dealt out
  // round-robin like the windows.
  create_kernel #(
    .LANES(LANES), .INNER(TAPS), .OUTER(N),
    .START(1), .INNER_STEP(1), .OUTER_STEP(0), .SPLIT_OUTER(1'b1)
  ) u_create2 (
    .clk, .rst_n, .start(go),
    .out_valid(h_valid), .out_ready(h_ready), .out_data(h_data),
    .done(c2_done)
  );

  for (genvar l = 0; l < LANES; l++) begin : g_branch
    stream_fifo u_window_stream (
      .clk, .rst_n,
      .in_valid(w_valid[l]), .in_ready(w_ready[l]), .in_data(w_data[l]),
      .out_valid(ws_valid[l]), .out_ready(ws_ready[l]), .out_data(ws_data[l])
    );
    stream_fifo u_coef_stream (
      .clk, .rst_n,
      .in_valid(h_valid[l]), .in_ready(h_ready[l]), .in_data(h_data[l]),
      .out_valid(hs_valid[l]), .out_ready(hs_ready[l]), .out_data(hs_data[l])
    );
    mul_kernel u_mul (
      .clk, .rst_n,
      .a_valid(ws_valid[l]), .a_ready(ws_ready[l]), .a_data(ws_data[l]),
      .b_valid(hs_valid[l]), .b_ready(hs_ready[l]), .b_data(hs_data[l]),
      .c_valid(m_valid[l]),  .c_ready(m_ready[l]),  .c_data(m_data[l])
    );
    stream_fifo u_mul_result (
      .clk, .rst_n,
      .in_valid(m_valid[l]), .in_ready(m_ready[l]), .in_data(m_data[l]),
      .out_valid(mr_valid[l]), .out_ready(mr_ready[l]), .out_data(mr_data[l])
    );
    sum_kernel #(.GROUP(TAPS)) u_sum (
      .clk, .rst_n, .start(go),
      .a_valid(mr_valid[l]), .a_ready(mr_ready[l]), .a_data(mr_data[l]),
      .r_valid(r_valid[l]),  .r_ready(r_ready[l]),  .r_data(r_data[l])
    );
    stream_fifo u_reduce_result (
      .clk, .rst_n,
      .in_valid(r_valid[l]), .in_ready(r_ready[l]), .in_data(r_data[l]),
      .out_valid(rr_valid[l]), .out_ready(rr_ready[l]), .out_data(rr_data[l])
    );
  end

  write_kernel #(
    .LANES(LANES), .MODE(WR_MERGE), .TOTAL(N), .BASE(BASE)
  ) u_write (
    .clk, .rst_n, .start(go),
    .in_valid(rr_valid), .in_ready(rr_ready), .in_data(rr_data),
    .mem_write, .mem_address, .mem_writedata, .mem_waitrequest,
    .done(wr_done), .words_written
  );

endmodule
