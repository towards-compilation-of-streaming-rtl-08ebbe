// create_kernel: stream source that produces an input stream with two nested
// loops, as the create1 and create2 kernels of the streaming applications do.
//
// The element with loop indices (outer, inner), outer in [0, OUTER) and inner
// in [0, INNER), has the value
//     START + inner * INNER_STEP + outer * OUTER_STEP        (mod 2^32)
// and the stream lists the elements with inner running fastest. Generating the
// data on chip keeps the shared off-chip memory out of the measured loop.
//
// Replication: with LANES > 1 the stream is dealt out round-robin to LANES
// output ports, one port per replica of the consuming kernel. With
// SPLIT_OUTER = 0 the single elements are dealt out (element i goes to lane
// i mod LANES; INNER must be a multiple of LANES); with SPLIT_OUTER = 1 whole
// inner loops are dealt out (inner loop o goes to lane o mod LANES). Each
// lane has its own counters, so every lane can emit one element per clock
// cycle and the source never limits the replicated kernels.
//
// The loop formula, the per-lane counters and the two split modes are this
// design's own choices; the round-robin dealing of elements to replicas
// follows the replication scheme of the design.
//
// Interface: a one-cycle start pulse loads the counters and starts all lanes;
// out_valid[l]/out_ready[l]/out_data[l] is lane l's stream; done is high when
// every lane has emitted its last element (and after reset). The first
// element is offered in the cycle after start.
module create_kernel
  import stream_pkg::*;
#(
  parameter int unsigned LANES       = 1,
  parameter int unsigned INNER       = 100000,
  parameter int unsigned OUTER       = 1,
  parameter int unsigned START       = 0,
  parameter int unsigned INNER_STEP  = 1,
  parameter int unsigned OUTER_STEP  = 0,
  parameter bit          SPLIT_OUTER = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic [LANES-1:0]  out_valid,
  input  logic [LANES-1:0]  out_ready,
  output word_t             out_data [LANES],
  output logic              done
);

  initial begin
    if (!SPLIT_OUTER && (INNER % LANES) != 0)
      $error("create_kernel: INNER must be a multiple of LANES when elements are dealt out");
  end

  logic [LANES-1:0] running;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [31:0] inner, outer;
    logic        last;

    // Loop indices of the lane's first element.
    localparam logic [31:0] INNER0 = SPLIT_OUTER ? 32'd0 : 32'(l);
    localparam logic [31:0] OUTER0 = SPLIT_OUTER ? 32'(l) : 32'd0;
    localparam logic [31:0] ISTEP  = SPLIT_OUTER ? 32'd1 : 32'(LANES);
    localparam logic [31:0] OSTEP  = SPLIT_OUTER ? 32'(LANES) : 32'd1;

    // The lane's current element is the last of its inner loop.
    logic inner_wrap;
    assign inner_wrap = (inner + ISTEP >= 32'(INNER));
    assign last       = inner_wrap && (outer + OSTEP >= 32'(OUTER));

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        running[l] <= 1'b0;
        inner      <= INNER0;
        outer      <= OUTER0;
      end else if (start) begin
        // A lane with no elements (more lanes than inner loops) stays idle.
        running[l] <= (OUTER0 < 32'(OUTER)) && (INNER0 < 32'(INNER));
        inner      <= INNER0;
        outer      <= OUTER0;
      end else if (out_valid[l] && out_ready[l]) begin
        if (inner_wrap) begin
          inner <= INNER0;
          outer <= outer + OSTEP;
        end else begin
          inner <= inner + ISTEP;
        end
        if (last) running[l] <= 1'b0;
      end
    end

    assign out_valid[l] = running[l];
    assign out_data[l]  = word_t'(32'(START) + inner * 32'(INNER_STEP) + outer * 32'(OUTER_STEP));
  end

  assign done = (running == '0);

endmodule
