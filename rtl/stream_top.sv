// stream_top: the two streaming applications of this design side by side,
// each with its own start controller and its own path to system memory.
//
// autocor: autocorrelation of an N_AC-sample on-chip signal for NSHIFT shift
//          distances (create1, create2 -> mul -> sum -> write);
// fir:     TAPS-tap FIR filter over an N_FIR-sample on-chip signal (create1
//          -> shift-register window -> mul x coefficients -> sum -> write).
// LANES_AC and LANES_FIR set how many times the mul and sum kernels of each
// application are replicated (1, 2 and 4 were evaluated; 1 is the basic
// flow with one hardware unit per kernel).
//
// The system memory, its SDRAM controller and the processor that checks the
// results are outside this RTL: each application brings out a write-only
// memory master with a byte address (mem_write, mem_address, mem_writedata,
// mem_waitrequest). The autocorrelation results are written from
// AC_BASE, the filter output from FIR_BASE, both in 32-bit words.
//
// Interface per application: a start request, busy, finished (set when the
// last result is written), cycles (length of the last run) and
// words_written. All inputs are synchronous to clk; rst_n is synchronous and
// active low.
module stream_top
  import stream_pkg::*;
#(
  parameter int unsigned N_AC      = 100000,
  parameter int unsigned NSHIFT    = 8,
  parameter int unsigned LANES_AC  = 1,
  parameter int unsigned N_FIR     = 100000,
  parameter int unsigned TAPS      = 8,
  parameter int unsigned LANES_FIR = 1,
  parameter logic [ADDR_W-1:0] AC_BASE  = 32'h0000_0000,
  parameter logic [ADDR_W-1:0] FIR_BASE = 32'h0010_0000
) (
  input  logic              clk,
  input  logic              rst_n,
  // autocorrelation
  input  logic              ac_start,
  output logic              ac_busy,
  output logic              ac_finished,
  output logic [31:0]       ac_cycles,
  output logic [31:0]       ac_words_written,
  output logic              ac_mem_write,
  output logic [ADDR_W-1:0] ac_mem_address,
  output word_t             ac_mem_writedata,
  input  logic              ac_mem_waitrequest,
  // FIR filter
  input  logic              fir_start,
  output logic              fir_busy,
  output logic              fir_finished,
  output logic [31:0]       fir_cycles,
  output logic [31:0]       fir_words_written,
  output logic              fir_mem_write,
  output logic [ADDR_W-1:0] fir_mem_address,
  output word_t             fir_mem_writedata,
  input  logic              fir_mem_waitrequest
);

  autocor_system #(
    .N(N_AC), .NSHIFT(NSHIFT), .LANES(LANES_AC), .BASE(AC_BASE)
  ) u_autocor (
    .clk, .rst_n,
    .start(ac_start), .busy(ac_busy), .finished(ac_finished), .cycles(ac_cycles),
    .mem_write(ac_mem_write), .mem_address(ac_mem_address),
    .mem_writedata(ac_mem_writedata), .mem_waitrequest(ac_mem_waitrequest),
    .words_written(ac_words_written)
  );

  fir_system #(
    .N(N_FIR), .TAPS(TAPS), .LANES(LANES_FIR), .BASE(FIR_BASE)
  ) u_fir (
    .clk, .rst_n,
    .start(fir_start), .busy(fir_busy), .finished(fir_finished), .cycles(fir_cycles),
    .mem_write(fir_mem_write), .mem_address(fir_mem_address),
    .mem_writedata(fir_mem_writedata), .mem_waitrequest(fir_mem_waitrequest),
    .words_written(fir_words_written)
  );

endmodule
