// tb_autocor_system: end-to-end test of the autocorrelation pipeline.
//
// Three copies run at once on N=64 samples and 8 shift distances: one with 4
// replicated branches behind a memory that stalls about 25% of the cycles,
// and two stall-free ones with 1 and 4 branches. Every stored R[d] is
// compared with sum_n n*(n+d) mod 2^32 computed here. The stall-free copies
// check the rate: a run takes 8*64/LANES cycles plus at most 16 cycles of
// pipeline fill and drain, so 4 branches are about 4 times as fast as one.
module tb_autocor_system;
  import stream_pkg::*;

  localparam int N = 64, NS = 8;
  localparam logic [31:0] BASE = 32'h2000;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic        busy [3], finished [3], mw [3], mwait [3];
  logic [31:0] cycles [3], maddr [3], words [3];
  word_t       mdata [3];

  autocor_system #(.N(N), .NSHIFT(NS), .LANES(4), .BASE(BASE)) dut_stall (
    .clk, .rst_n, .start, .busy(busy[0]), .finished(finished[0]), .cycles(cycles[0]),
    .mem_write(mw[0]), .mem_address(maddr[0]), .mem_writedata(mdata[0]),
    .mem_waitrequest(mwait[0]), .words_written(words[0]));
  sysmem_model #(.STALL_PCT(25)) mem0 (.clk, .write(mw[0]), .address(maddr[0]),
    .writedata(mdata[0]), .waitrequest(mwait[0]));

  autocor_system #(.N(N), .NSHIFT(NS), .LANES(1), .BASE(BASE)) dut_l1 (
    .clk, .rst_n, .start, .busy(busy[1]), .finished(finished[1]), .cycles(cycles[1]),
    .mem_write(mw[1]), .mem_address(maddr[1]), .mem_writedata(mdata[1]),
    .mem_waitrequest(mwait[1]), .words_written(words[1]));
  sysmem_model #(.STALL_PCT(0)) mem1 (.clk, .write(mw[1]), .address(maddr[1]),
    .writedata(mdata[1]), .waitrequest(mwait[1]));

  autocor_system #(.N(N), .NSHIFT(NS), .LANES(4), .BASE(BASE)) dut_l4 (
    .clk, .rst_n, .start, .busy(busy[2]), .finished(finished[2]), .cycles(cycles[2]),
    .mem_write(mw[2]), .mem_address(maddr[2]), .mem_writedata(mdata[2]),
    .mem_waitrequest(mwait[2]), .words_written(words[2]));
  sysmem_model #(.STALL_PCT(0)) mem2 (.clk, .write(mw[2]), .address(maddr[2]),
    .writedata(mdata[2]), .waitrequest(mwait[2]));

  function automatic word_t ref_r(int d);
    word_t acc = '0;
    for (int n = 0; n < N; n++) acc += word_t'(n) * word_t'(n + d);
    return acc;
  endfunction

  function automatic word_t stored(int which, int d);
    case (which)
      0: return mem0.read_word(BASE + 4 * d);
      1: return mem1.read_word(BASE + 4 * d);
      default: return mem2.read_word(BASE + 4 * d);
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(negedge clk);
    wait (finished[0] && finished[1] && finished[2]);
    for (int w = 0; w < 3; w++) begin
      for (int d = 0; d < NS; d++) begin
        checks++;
        if (stored(w, d) !== ref_r(d)) begin
          failures++; $display("copy %0d R[%0d]: got %h expected %h", w, d, stored(w, d), ref_r(d));
        end
      end
      checks++;
      if (words[w] != NS) begin failures++; $display("copy %0d wrote %0d words", w, words[w]); end
    end
    checks++;
    if (mem0.stalls == 0) begin failures++; $display("memory never stalled"); end
    checks++;
    if (cycles[1] < NS * N || cycles[1] > NS * N + 16) begin
      failures++; $display("1 branch: %0d cycles, expected %0d..%0d", cycles[1], NS * N, NS * N + 16);
    end
    checks++;
    if (cycles[2] < NS * N / 4 || cycles[2] > NS * N / 4 + 16) begin
      failures++; $display("4 branches: %0d cycles, expected %0d..%0d", cycles[2], NS * N / 4, NS * N / 4 + 16);
    end
    $display("cycles: stalled x4 %0d, x1 %0d, x4 %0d", cycles[0], cycles[1], cycles[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
