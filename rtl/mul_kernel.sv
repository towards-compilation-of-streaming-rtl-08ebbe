// mul_kernel: the map kernel "c = a * b" applied to every element of two
// input streams.
//
// It pairs the heads of stream a and stream b, multiplies them and delivers
// the low 32 bits of the product (C 'int' multiplication) on stream c. The
// function follows the design's example kernel; the single output register
// is this design's own choice.
//
// Timing: one element per clock cycle when both inputs have data and the
// output is taken; a product appears on c one cycle after its operands were
// taken. The kernel pops a and b together, only when the output register is
// empty or is being emptied in the same cycle.
//
// Interface: a_valid/a_ready/a_data, b_valid/b_ready/b_data (inputs),
// c_valid/c_ready/c_data (output); rst_n is synchronous, active low.
module mul_kernel
  import stream_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  a_valid,
  output logic  a_ready,
  input  word_t a_data,
  input  logic  b_valid,
  output logic  b_ready,
  input  word_t b_data,
  output logic  c_valid,
  input  logic  c_ready,
  output word_t c_data
);

  logic room, take;

  assign room    = !c_valid || c_ready;
  assign take    = a_valid && b_valid && room;
  assign a_ready = b_valid && room;
  assign b_ready = a_valid && room;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c_valid <= 1'b0;
      c_data  <= '0;
    end else if (take) begin
      c_valid <= 1'b1;
      c_data  <= a_data * b_data;
    end else if (c_ready) begin
      c_valid <= 1'b0;
    end
  end

endmodule
