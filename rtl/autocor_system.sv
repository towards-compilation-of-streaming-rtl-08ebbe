// autocor_system: the autocorrelation application built as a pipeline of
// stream kernels joined by FIFOs (create1, create2 -> mul -> sum -> write).
//
// For each shift distance d in [0, NSHIFT) the application computes
//     R[d] = sum_{n=0}^{N-1} x[n] * x[n+d]          (mod 2^32)
// of the on-chip test signal x[n] = n. create1 streams x[n] and create2 the
// shifted signal x[n+d], both as NSHIFT * N elements (shift outer, sample
// inner). mul forms the products, sum reduces every run of N products (per
// replica N / LANES) to one element, and write stores R[0..NSHIFT-1] at
// consecutive words from BASE.
//
// Replication (LANES > 1): mul and sum are instantiated LANES times, each
// branch with its own stream1, stream2, mul_result and reduce_result FIFOs.
// The create kernels deal the elements out round-robin (element n of a shift
// goes to branch n mod LANES), so each branch handles 1/LANES of the
// elements. Each sum replica then holds a partial sum of R[d]; the write
// kernel takes one partial from every branch and stores their sum. The
// pipeline structure, the FIFO depth and the round-robin dealing follow the
// design; the test signal, the ordering of shifts in the stream and the
// joining of partial sums in the write kernel are this design's own choices.
//
// Timing: after start, the pipeline takes LANES products per clock cycle, so
// a run lasts about NSHIFT * N / LANES cycles plus a few cycles of pipeline
// fill, unless the memory stalls. Interface: start/busy/finished/cycles from
// the controller, a write-only memory master (mem_*) and the count of
// results written. N must be a multiple of LANES.
module autocor_system
  import stream_pkg::*;
#(
  parameter int unsigned N      = 100000,
  parameter int unsigned NSHIFT = 8,
  parameter int unsigned LANES  = 1,
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

  // create -> stream FIFOs
  logic [LANES-1:0] c1_valid, c1_ready, c2_valid, c2_ready;
  word_t            c1_data [LANES];
  word_t            c2_data [LANES];
  // stream FIFOs -> mul
  logic [LANES-1:0] s1_valid, s1_ready, s2_valid, s2_ready;
  word_t            s1_data [LANES];
  word_t            s2_data [LANES];
  // mul -> mul_result FIFO -> sum
  logic [LANES-1:0] m_valid, m_ready, mr_valid, mr_ready;
  word_t            m_data  [LANES];
  word_t            mr_data [LANES];
  // sum -> reduce_result FIFO -> write
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

  // Signal x[n] = n, one pass over the samples per shift distance.
  create_kernel #(
    .LANES(LANES), .INNER(N), .OUTER(NSHIFT),
    .START(0), .INNER_STEP(1), .OUTER_STEP(0), .SPLIT_OUTER(1'b0)
  ) u_create1 (
    .clk, .rst_n, .start(go),
    .out_valid(c1_valid), .out_ready(c1_ready), .out_data(c1_data),
    .done(c1_done)
  );

  // Shifted signal x[n+d] = n + d.
  create_kernel #(
    .LANES(LANES), .INNER(N), .OUTER(NSHIFT),
    .START(0), .INNER_STEP(1), .OUTER_STEP(1), .SPLIT_OUTER(1'b0)
  ) u_create2 (
    .clk, .rst_n, .start(go),
    .out_valid(c2_valid), .out_ready(c2_ready), .out_data(c2_data),
    .done(c2_done)
  );

  for (genvar l = 0; l < LANES; l++) begin : g_branch
    stream_fifo u_stream1 (
      .clk, .rst_n,
      .in_valid(c1_valid[l]), .in_ready(c1_ready[l]), .in_data(c1_data[l]),
      .out_valid(s1_valid[l]), .out_ready(s1_ready[l]), .out_data(s1_data[l])
    );
    stream_fifo u_stream2 (
      .clk, .rst_n,
      .in_valid(c2_valid[l]), .in_ready(c2_ready[l]), .in_data(c2_data[l]),
      .out_valid(s2_valid[l]), .out_ready(s2_ready[l]), .out_data(s2_data[l])
    );
    mul_kernel u_mul (
      .clk, .rst_n,
      .a_valid(s1_valid[l]), .a_ready(s1_ready[l]), .a_data(s1_data[l]),
      .b_valid(s2_valid[l]), .b_ready(s2_ready[l]), .b_data(s2_data[l]),
      .c_valid(m_valid[l]),  .c_ready(m_ready[l]),  .c_data(m_data[l])
    );
    stream_fifo u_mul_result (
      .clk, .rst_n,
      .in_valid(m_valid[l]), .in_ready(m_ready[l]), .in_data(m_data[l]),
      .out_valid(mr_valid[l]), .out_ready(mr_ready[l]), .out_data(mr_data[l])
    );
    sum_kernel #(.GROUP(N / LANES)) u_sum (
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
    .LANES(LANES), .MODE(WR_SUM), .TOTAL(NSHIFT), .BASE(BASE)
  ) u_write (
    .clk, .rst_n, .start(go),
    .in_valid(rr_valid), .in_ready(rr_ready), .in_data(rr_data),
    .mem_write, .mem_address, .mem_writedata, .mem_waitrequest,
    .done(wr_done), .words_written
  );

endmodule
