// stream_fifo: the on-chip FIFO that carries one stream between two kernels.
//
// Kernels never see read or write pointers: a producer pushes elements with a
// valid/ready handshake and the consumer pops them the same way. The buffer
// lets a fast consumer keep working while a slower producer catches up, which
// is why the streams are FIFOs rather than single registers. Depth (4) and
// element width (32 bits) follow the design's evaluation setup.
//
// Implementation (this design's own choice): a register array with a read and
// a write pointer and an occupancy counter. The head element is visible on
// out_data whenever out_valid is high (show-ahead). in_ready is "not full"; a
// full FIFO does not take a write in the cycle it is read. A push is seen at
// the output one cycle later. rst_n is synchronous, active low, and empties
// the FIFO.
//
// Interface: in_valid/in_ready/in_data (producer side), out_valid/out_ready/
// out_data (consumer side); a transfer happens on a rising clock edge when
// valid and ready are both high.
module stream_fifo #(
  parameter int unsigned DATA_W = stream_pkg::DATA_W,
  parameter int unsigned DEPTH  = stream_pkg::FIFO_DEPTH
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [DATA_W-1:0]          in_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [DATA_W-1:0]          out_data
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [PTR_W-1:0]  wr_ptr, rd_ptr;
  logic              push, pop;
  logic [$clog2(DEPTH+1)-1:0] count;  // occupancy

  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [PTR_W-1:0] next_ptr(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  // A producer that offers an element keeps offering the same element until
  // it is taken.
  property p_in_hold;
    @(posedge clk) disable iff (!rst_n)
      (in_valid && !in_ready) |=> (in_valid && $stable(in_data));
  endproperty
  a_in_hold: assert property (p_in_hold)
    else $error("stream_fifo: producer dropped or changed an element under backpressure");

endmodule
