// tb_fir_system: end-to-end test of the FIR filter pipeline.
//
// Three copies run at once on N=40 samples with 8 taps: 2 replicated
// branches behind a memory that stalls about 25% of the cycles, and
// stall-free copies with 1 and 4 branches. Every stored y[n] is compared with
// sum_k (k+1) * x[n-k], x[m] = m (0 for m < 0), computed here. The rate is
// bounded by the single shift-register kernel: a stall-free run takes
// N*TAPS cycles plus at most 16, whatever the number of branches.
module tb_fir_system;
  import stream_pkg::*;

  localparam int N = 40, T = 8;
  localparam logic [31:0] BASE = 32'h8000;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic        busy [3], finished [3], mw [3], mwait [3];
  logic [31:0] cycles [3], maddr [3], words [3];
  word_t       mdata [3];

  fir_system #(.N(N), .TAPS(T), .LANES(2), .BASE(BASE)) dut_stall (
    .clk, .rst_n, .start, .busy(busy[0]), .finished(finished[0]), .cycles(cycles[0]),
    .mem_write(mw[0]), .mem_address(maddr[0]), .mem_writedata(mdata[0]),
    .mem_waitrequest(mwait[0]), .words_written(words[0]));
  sysmem_model #(.STALL_PCT(25)) mem0 (.clk, .write(mw[0]), .address(maddr[0]),
    .writedata(mdata[0]), .waitrequest(mwait[0]));

  fir_system #(.N(N), .TAPS(T), .LANES(1), .BASE(BASE)) dut_l1 (
    .clk, .rst_n, .start, .busy(busy[1]), .finished(finished[1]), .cycles(cycles[1]),
    .mem_write(mw[1]), .mem_address(maddr[1]), .mem_writedata(mdata[1]),
    .mem_waitrequest(mwait[1]), .words_written(words[1]));
  sysmem_model #(.STALL_PCT(0)) mem1 (.clk, .write(mw[1]), .address(maddr[1]),
    .writedata(mdata[1]), .waitrequest(mwait[1]));

  fir_system #(.N(N), .TAPS(T), .LANES(4), .BASE(BASE)) dut_l4 (
    .clk, .rst_n, .start, .busy(busy[2]), .finished(finished[2]), .cycles(cycles[2]),
    .mem_write(mw[2]), .mem_address(maddr[2]), .mem_writedata(mdata[2]),
    .mem_waitrequest(mwait[2]), .words_written(words[2]));
  sysmem_model #(.STALL_PCT(0)) mem2 (.clk, .write(mw[2]), .address(maddr[2]),
    .writedata(mdata[2]), .waitrequest(mwait[2]));

  function automatic word_t ref_y(int n);
    word_t acc = '0;
    for (int k = 0; k < T; k++) if (n - k >= 0) acc += word_t'(k + 1) * word_t'(n - k);
    return acc;
  endfunction

  function automatic word_t stored(int which, int n);
    case (which)
      0: return mem0.read_word(BASE + 4 * n);
      1: return mem1.read_word(BASE + 4 * n);
      default: return mem2.read_word(BASE + 4 * n);
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
      for (int n = 0; n < N; n++) begin
        checks++;
        if (stored(w, n) !== ref_y(n)) begin
          failures++; $display("copy %0d y[%0d]: got %h expected %h", w, n, stored(w, n), ref_y(n));
        end
      end
      checks++;
      if (words[w] != N) begin failures++; $display("copy %0d wrote %0d words", w, words[w]); end
    end
    checks++;
    if (mem0.stalls == 0) begin failures++; $display("memory never stalled"); end
    for (int w = 1; w < 3; w++) begin
      checks++;
      if (cycles[w] < N * T || cycles[w] > N * T + 16) begin
        failures++; $display("copy %0d: %0d cycles, expected %0d..%0d", w, cycles[w], N * T, N * T + 16);
      end
    end
    $display("cycles: stalled x2 %0d, x1 %0d, x4 %0d", cycles[0], cycles[1], cycles[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
