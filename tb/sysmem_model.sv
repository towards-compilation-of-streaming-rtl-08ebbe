// sysmem_model: behavioural model of the system memory seen by a write
// kernel (not synthesizable; testbench use only).
//
// It stands in for the off-chip SDRAM behind its controller: a slave with a
// write-only Avalon-MM-style port. Each word written is kept in an
// associative array indexed by byte address. With STALL_PCT > 0 the model
// raises waitrequest at random (about STALL_PCT percent of the cycles) to
// exercise the master's stall handling; the write completes in a cycle with
// write high and waitrequest low. Counters report completed writes and the
// cycles in which a write was stalled.
module sysmem_model #(
  parameter int unsigned STALL_PCT = 0
) (
  input  logic        clk,
  input  logic        write,
  input  logic [31:0] address,
  input  logic [31:0] writedata,
  output logic        waitrequest
);

  logic [31:0] mem [logic [31:0]];
  int unsigned writes = 0;
  int unsigned stalls = 0;

  initial waitrequest = 1'b0;

  always @(posedge clk) begin
    if (write && !waitrequest) begin
      mem[address] = writedata;
      writes++;
    end
    if (write && waitrequest) stalls++;
    waitrequest <= (STALL_PCT != 0) && (($urandom % 100) < STALL_PCT);
  end

  function automatic logic [31:0] read_word(input logic [31:0] addr);
    return mem.exists(addr) ? mem[addr] : 32'hDEAD_BEEF;
  endfunction

  // Forget all contents and counts, e.g. after the master's reset (its
  // outputs are undefined until the first clock edge in reset).
  function automatic void clear();
    mem.delete();
    writes = 0;
    stalls = 0;
  endfunction

  function automatic bit written(input logic [31:0] addr);
    return mem.exists(addr);
  endfunction

endmodule
