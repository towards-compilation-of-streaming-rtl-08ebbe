// tb_stream_top_replicated: the replicated workloads at full size.
//
// Two tops run at once with the full signal lengths (100,000 samples, 8
// shifts, 8 taps): one with every mul/sum kernel replicated twice, one with
// four copies. All 8 R[d] and all 100,000 y[n] of each top are compared with
// values computed here. The autocorrelation must take 800,000/LANES cycles
// plus at most 32; the FIR stays at 800,000 cycles plus at most 32, bounded
// by its single shift-register kernel.
module tb_stream_top_replicated;
  import stream_pkg::*;

  localparam int NA = 100000, NS = 8, NF = 100000, T = 8;
  localparam logic [31:0] AC_BASE = 32'h0000_0000, FIR_BASE = 32'h0010_0000;
  localparam int LANES [2] = '{2, 4};

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic        ac_busy [2], ac_finished [2], fir_busy [2], fir_finished [2];
  logic [31:0] ac_cycles [2], fir_cycles [2], ac_words [2], fir_words [2];
  logic        ac_mw [2], ac_wait [2], fir_mw [2], fir_wait [2];
  logic [31:0] ac_addr [2], fir_addr [2];
  word_t       ac_wdata [2], fir_wdata [2];

  for (genvar i = 0; i < 2; i++) begin : g_top
    stream_top #(.LANES_AC(LANES[i]), .LANES_FIR(LANES[i])) dut (
      .clk, .rst_n,
      .ac_start(start), .ac_busy(ac_busy[i]), .ac_finished(ac_finished[i]),
      .ac_cycles(ac_cycles[i]), .ac_words_written(ac_words[i]),
      .ac_mem_write(ac_mw[i]), .ac_mem_address(ac_addr[i]),
      .ac_mem_writedata(ac_wdata[i]), .ac_mem_waitrequest(ac_wait[i]),
      .fir_start(start), .fir_busy(fir_busy[i]), .fir_finished(fir_finished[i]),
      .fir_cycles(fir_cycles[i]), .fir_words_written(fir_words[i]),
      .fir_mem_write(fir_mw[i]), .fir_mem_address(fir_addr[i]),
      .fir_mem_writedata(fir_wdata[i]), .fir_mem_waitrequest(fir_wait[i]));
    sysmem_model mem_ac (.clk, .write(ac_mw[i]), .address(ac_addr[i]),
      .writedata(ac_wdata[i]), .waitrequest(ac_wait[i]));
    sysmem_model mem_fir (.clk, .write(fir_mw[i]), .address(fir_addr[i]),
      .writedata(fir_wdata[i]), .waitrequest(fir_wait[i]));
  end

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

  function automatic word_t ac_word(int i, int d);
    return (i == 0) ? g_top[0].mem_ac.read_word(AC_BASE + 4 * d)
                    : g_top[1].mem_ac.read_word(AC_BASE + 4 * d);
  endfunction

  function automatic word_t fir_word(int i, int n);
    return (i == 0) ? g_top[0].mem_fir.read_word(FIR_BASE + 4 * n)
                    : g_top[1].mem_fir.read_word(FIR_BASE + 4 * n);
  endfunction

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int bad = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(negedge clk);
    wait (ac_finished[0] && ac_finished[1] && fir_finished[0] && fir_finished[1]);
    for (int i = 0; i < 2; i++) begin
      for (int d = 0; d < NS; d++) begin
        checks++;
        if (ac_word(i, d) !== ref_r(d)) begin
          failures++; $display("x%0d R[%0d]: got %h expected %h", LANES[i], d, ac_word(i, d), ref_r(d));
        end
      end
      for (int n = 0; n < NF; n++) begin
        checks++;
        if (fir_word(i, n) !== ref_y(n)) begin
          failures++;
          if (bad++ < 10) $display("x%0d y[%0d]: got %h expected %h", LANES[i], n, fir_word(i, n), ref_y(n));
        end
      end
      checks++;
      if (ac_words[i] != NS || fir_words[i] != NF) begin
        failures++; $display("x%0d words written %0d %0d", LANES[i], ac_words[i], fir_words[i]);
      end
      checks++;
      if (ac_cycles[i] < NS * NA / LANES[i] || ac_cycles[i] > NS * NA / LANES[i] + 32) begin
        failures++; $display("x%0d autocorrelation took %0d cycles", LANES[i], ac_cycles[i]);
      end
      checks++;
      if (fir_cycles[i] < T * NF || fir_cycles[i] > T * NF + 32) begin
        failures++; $display("x%0d FIR took %0d cycles", LANES[i], fir_cycles[i]);
      end
      $display("x%0d: autocorrelation %0d cycles, FIR %0d cycles", LANES[i], ac_cycles[i], fir_cycles[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
