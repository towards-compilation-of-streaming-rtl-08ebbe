// sum_kernel: the reduction kernel "r = r + a".
//
// It sums each run of GROUP consecutive elements of its input stream and
// emits one element per run, so an input of IN_LENGTH elements becomes an
// output of IN_LENGTH / GROUP elements. As in the design's reduction loop,
// the first element of a run loads the running sum and the following ones are
// added to it; additions wrap modulo 2^32.
//
// Timing: one input element per clock cycle. The sum of a run is offered on
// r one cycle after its last element was taken. The input is stalled only
// while a finished sum waits on a full output.
//
// Interface: a_valid/a_ready/a_data (input stream), r_valid/r_ready/r_data
// (reduced stream). start clears the run position, so a new stream begins a
// new run; rst_n is synchronous, active low. The start input and the output
// register are this design's own choices.
module sum_kernel
  import stream_pkg::*;
#(
  parameter int unsigned GROUP = 100000
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  a_valid,
  output logic  a_ready,
  input  word_t a_data,
  output logic  r_valid,
  input  logic  r_ready,
  output word_t r_data
);

  logic [31:0] pos;      // index of the next element inside its run
  word_t       acc;      // running sum of the current run
  logic        take, first, last;

  assign a_ready = !r_valid || r_ready;
  assign take    = a_valid && a_ready;
  assign first   = (pos == '0);
  assign last    = (pos == 32'(GROUP - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos     <= '0;
      acc     <= '0;
      r_valid <= 1'b0;
      r_data  <= '0;
    end else begin
      if (r_valid && r_ready) r_valid <= 1'b0;
      if (start) begin
        pos <= '0;
      end else if (take) begin
        acc <= first ? a_data : acc + a_data;
        if (last) begin
          pos     <= '0;
          r_valid <= 1'b1;
          r_data  <= first ? a_data : acc + a_data;
        end else begin
          pos <= pos + 1'b1;
        end
      end
    end
  end

endmodule
