// write_kernel: stream sink that stores the results of an application in
// system memory so they can be checked.
//
// It reads the result streams of LANES kernel replicas and issues one memory
// write per result word, at consecutive 32-bit word addresses starting at
// BASE. Two ways of joining the lanes are provided:
//   WR_MERGE  lanes are read one element at a time in round-robin order
//             (lane 0, 1, ..., LANES-1, 0, ...), which restores the order in
//             which a source dealt the elements out to the replicas;
//   WR_SUM    one element is taken from every lane at once and their sum is
//             stored; this joins the partial sums of replicated reduction
//             kernels into the full reduction.
// The design names the write kernel and its job; the memory port, the two
// join modes and the word count are this design's own choices.
//
// Memory port: a simple write-only master in the style of an Avalon-MM
// master: mem_write, mem_address (byte address), mem_writedata; the slave
// holds mem_waitrequest high to stall, and the write completes in the first
// cycle in which mem_write is high and mem_waitrequest low.
//
// Timing: a start pulse clears the word counter; after it the kernel accepts
// at most TOTAL words, one per clock cycle while the memory does not stall.
// A word taken from the lanes is offered to memory in the next cycle. done
// is high when TOTAL words have been written and no write is pending (and
// after reset, before the first start).
module write_kernel
  import stream_pkg::*;
#(
  parameter int unsigned LANES = 1,
  parameter write_mode_e MODE  = WR_MERGE,
  parameter int unsigned TOTAL = 8,
  parameter logic [ADDR_W-1:0] BASE = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [LANES-1:0]  in_valid,
  output logic [LANES-1:0]  in_ready,
  input  word_t             in_data [LANES],
  output logic              mem_write,
  output logic [ADDR_W-1:0] mem_address,
  output word_t             mem_writedata,
  input  logic              mem_waitrequest,
  output logic              done,
  output logic [31:0]       words_written
);

  localparam int unsigned LANE_W = (LANES > 1) ? $clog2(LANES) : 1;

  logic              running;   // between start and the last word taken
  logic [31:0]       taken;     // words taken from the lanes since start
  logic [LANE_W-1:0] turn;      // lane read next in WR_MERGE mode
  logic              room;      // the write register can load a word
  logic              take;
  word_t             word;

  assign room = !mem_write || !mem_waitrequest;

  always_comb begin
    in_ready = '0;
    take     = 1'b0;
    word     = '0;
    if (MODE == WR_SUM) begin
      take = running && room && (&in_valid);
      in_ready = {LANES{running && room && (&in_valid)}};
      for (int l = 0; l < LANES; l++) word = word + in_data[l];
    end else begin
      take = running && room && in_valid[turn];
      in_ready[turn] = running && room;
      word = in_data[turn];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running       <= 1'b0;
      taken         <= '0;
      turn          <= '0;
      mem_write     <= 1'b0;
      mem_address   <= BASE;
      mem_writedata <= '0;
      words_written <= '0;
    end else begin
      if (mem_write && !mem_waitrequest) begin
        mem_write     <= 1'b0;
        mem_address   <= mem_address + ADDR_W'(4);
        words_written <= words_written + 1'b1;
      end
      if (start) begin
        running       <= (TOTAL != 0);
        taken         <= '0;
        turn          <= '0;
        mem_address   <= BASE;
        words_written <= '0;
      end else if (take) begin
        mem_write     <= 1'b1;
        mem_writedata <= word;
        taken         <= taken + 1'b1;
        if (taken == 32'(TOTAL - 1)) running <= 1'b0;
        if (MODE == WR_MERGE)
          turn <= (turn == LANE_W'(LANES - 1)) ? '0 : turn + 1'b1;
      end
    end
  end

  assign done = !running && !mem_write;

  // The memory sees a stable request while it stalls.
  a_mem_hold: assert property (@(posedge clk) disable iff (!rst_n)
      (mem_write && mem_waitrequest) |=> (mem_write && $stable(mem_address) && $stable(mem_writedata)))
    else $error("write_kernel: write request changed while the memory stalled");

endmodule
