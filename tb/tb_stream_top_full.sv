// tb_stream_top_full: one complete run of both applications at full size.
//
// The top keeps all its default parameters: autocorrelation of 100,000
// samples for 8 shift distances and an 8-tap FIR filter over 100,000
// samples, one hardware unit per kernel. Memory never stalls. All 8 R[d] and
// all 100,000 y[n] are compared with values computed here, and each run must
// take 800,000 cycles (one stream element per cycle) plus at most 32 cycles
// of pipeline fill and drain.
module tb_stream_top_full;
  import stream_pkg::*;

  localparam int NA = 100000, NS = 8, NF = 100000, T = 8;
  localparam logic [31:0] AC_BASE = 32'h0000_0000, FIR_BASE = 32'h0010_0000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        ac_start = 1'b0, fir_start = 1'b0;
  logic        ac_busy, ac_finished, fir_busy, fir_finished;
  logic [31:0] ac_cycles, fir_cycles, ac_words_written, fir_words_written;
  logic        ac_mem_write, ac_mem_waitrequest, fir_mem_write, fir_mem_waitrequest;
  logic [31:0] ac_mem_address, fir_mem_address;
  word_t       ac_mem_writedata, fir_mem_writedata;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  stream_top dut (.*);

  sysmem_model mem_ac (.clk, .write(ac_mem_write), .address(ac_mem_address),
    .writedata(ac_mem_writedata), .waitrequest(ac_mem_waitrequest));
  sysmem_model mem_fir (.clk, .write(fir_mem_write), .address(fir_mem_address),
    .writedata(fir_mem_writedata), .waitrequest(fir_mem_waitrequest));

  function automatic word_t ref_r(int d);
    word_t acc = '0;
    for (int n = 0; n < NA; n++) acc += word_t'(n) * word_t'(n + d);
    return acc;
  endfunction

  function automatic word_t ref_y(int n);
    word_t acc = '0;
    for (int k = 0; k < T; k++) if (n - k >= 0) acc += word_t'(k + 1) * word_t'(n - k);
    return acc;
  endfunction

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int bad_y = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    ac_start  <= 1'b1;
    fir_start <= 1'b1;
    @(posedge clk);
    ac_start  <= 1'b0;
    fir_start <= 1'b0;
    @(negedge clk);
    wait (ac_finished && fir_finished);
    for (int d = 0; d < NS; d++) begin
      checks++;
      if (mem_ac.read_word(AC_BASE + 4 * d) !== ref_r(d)) begin
        failures++; $display("R[%0d]: got %h expected %h", d, mem_ac.read_word(AC_BASE + 4 * d), ref_r(d));
      end
    end
    for (int n = 0; n < NF; n++) begin
      checks++;
      if (mem_fir.read_word(FIR_BASE + 4 * n) !== ref_y(n)) begin
        failures++;
        if (bad_y++ < 10) $display("y[%0d]: got %h expected %h", n, mem_fir.read_word(FIR_BASE + 4 * n), ref_y(n));
      end
    end
    checks++;
    if (ac_words_written != NS || fir_words_written != NF) begin
      failures++; $display("words written %0d %0d", ac_words_written, fir_words_written);
    end
    checks++;
    if (ac_cycles < NS * NA || ac_cycles > NS * NA + 32) begin
      failures++; $display("autocorrelation took %0d cycles", ac_cycles);
    end
    checks++;
    if (fir_cycles < T * NF || fir_cycles > T * NF + 32) begin
      failures++; $display("FIR took %0d cycles", fir_cycles);
    end
    $display("autocorrelation %0d cycles, FIR %0d cycles", ac_cycles, fir_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
