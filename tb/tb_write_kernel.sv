// tb_write_kernel: self-checking test of the memory-writing sink.
//
// Two sinks run side by side, each on its own memory model that stalls about
// 30% of the cycles. Sink M merges 3 lanes (TOTAL=30, BASE=0x100): lane l
// carries elements 3*j + l of a sequence, and memory must hold the sequence
// in order. Sink S sums 2 lanes (TOTAL=12, BASE=0x400): memory must hold the
// lane-wise sums. Lane producers offer at random. The test checks the stored
// words and addresses, that no extra word is taken, the done flag, and with
// a stall-free memory the rate of one word per cycle.
module tb_write_kernel;
  import stream_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  int   checks = 0, failures = 0, cyc = 0;
  int   pct = 60;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  // Merge sink
  logic [2:0]  m_valid, m_ready;
  word_t       m_data [3];
  logic        m_write, m_wait, m_done;
  logic [31:0] m_addr, m_words;
  word_t       m_wdata;
  // Sum sink
  logic [1:0]  s_valid, s_ready;
  word_t       s_data [2];
  logic        s_write, s_wait, s_done;
  logic [31:0] s_addr, s_words;
  word_t       s_wdata;
  // Full-rate sink (merge, 2 lanes, never stalled)
  logic [1:0]  f_valid, f_ready;
  word_t       f_data [2];
  logic        f_write, f_wait, f_done;
  logic [31:0] f_addr, f_words;
  word_t       f_wdata;

  write_kernel #(.LANES(3), .MODE(WR_MERGE), .TOTAL(30), .BASE(32'h100)) dut_m (
    .clk, .rst_n, .start, .in_valid(m_valid), .in_ready(m_ready), .in_data(m_data),
    .mem_write(m_write), .mem_address(m_addr), .mem_writedata(m_wdata),
    .mem_waitrequest(m_wait), .done(m_done), .words_written(m_words));
  sysmem_model #(.STALL_PCT(30)) mem_m (.clk, .write(m_write), .address(m_addr),
    .writedata(m_wdata), .waitrequest(m_wait));

  write_kernel #(.LANES(2), .MODE(WR_SUM), .TOTAL(12), .BASE(32'h400)) dut_s (
    .clk, .rst_n, .start, .in_valid(s_valid), .in_ready(s_ready), .in_data(s_data),
    .mem_write(s_write), .mem_address(s_addr), .mem_writedata(s_wdata),
    .mem_waitrequest(s_wait), .done(s_done), .words_written(s_words));
  sysmem_model #(.STALL_PCT(30)) mem_s (.clk, .write(s_write), .address(s_addr),
    .writedata(s_wdata), .waitrequest(s_wait));

  write_kernel #(.LANES(2), .MODE(WR_MERGE), .TOTAL(20), .BASE(32'h0)) dut_f (
    .clk, .rst_n, .start, .in_valid(f_valid), .in_ready(f_ready), .in_data(f_data),
    .mem_write(f_write), .mem_address(f_addr), .mem_writedata(f_wdata),
    .mem_waitrequest(f_wait), .done(f_done), .words_written(f_words));
  sysmem_model #(.STALL_PCT(0)) mem_f (.clk, .write(f_write), .address(f_addr),
    .writedata(f_wdata), .waitrequest(f_wait));

  // Reference sequences: merge element i = 1000 + 7*i; sum lane l element j.
  function automatic word_t mseq(int i);  return word_t'(1000 + 7 * i); endfunction
  function automatic word_t sseq(int l, int j); return word_t'(32'h9000_0000 * l + 3 * j + l); endfunction

  int m_next [3], s_next [2], f_next [2];
  bit go_f = 1'b0;

  // Lane producers: each offers up to 14 (merge) / 13 (sum) elements, more
  // than the sinks may take, to check that they stop at TOTAL.
  always @(posedge clk) begin
    if (!rst_n) begin
      m_valid <= '0; s_valid <= '0; f_valid <= '0;
      for (int l = 0; l < 3; l++) m_next[l] = 0;
      for (int l = 0; l < 2; l++) begin s_next[l] = 0; f_next[l] = 0; end
    end else begin
      for (int l = 0; l < 3; l++) begin
        if (m_valid[l] && m_ready[l]) m_next[l]++;
        if (!m_valid[l] || m_ready[l]) m_valid[l] <= (m_next[l] < 14) && (($urandom % 100) < pct);
      end
      for (int l = 0; l < 2; l++) begin
        if (s_valid[l] && s_ready[l]) s_next[l]++;
        if (!s_valid[l] || s_ready[l]) s_valid[l] <= (s_next[l] < 13) && (($urandom % 100) < pct);
        if (f_valid[l] && f_ready[l]) f_next[l]++;
        f_valid[l] <= go_f && (f_next[l] + (f_valid[l] && f_ready[l]) < 10);
      end
    end
  end
  always_comb begin
    for (int l = 0; l < 3; l++) m_data[l] = mseq(3 * m_next[l] + l);
    for (int l = 0; l < 2; l++) s_data[l] = sseq(l, s_next[l]);
    for (int l = 0; l < 2; l++) f_data[l] = word_t'(2 * f_next[l] + l);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t0, t1;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    mem_m.clear();
    mem_s.clear();
    mem_f.clear();
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(negedge clk);
    wait (m_done && s_done);
    repeat (20) @(posedge clk);
    for (int i = 0; i < 30; i++) begin
      checks++;
      if (mem_m.read_word(32'h100 + 4 * i) !== mseq(i)) begin
        failures++; $display("merge word %0d: got %h expected %h", i, mem_m.read_word(32'h100 + 4 * i), mseq(i));
      end
    end
    for (int j = 0; j < 12; j++) begin
      checks++;
      if (mem_s.read_word(32'h400 + 4 * j) !== word_t'(sseq(0, j) + sseq(1, j))) begin
        failures++; $display("sum word %0d: got %h expected %h", j, mem_s.read_word(32'h400 + 4 * j), sseq(0, j) + sseq(1, j));
      end
    end
    checks++;
    if (mem_m.writes != 30 || mem_s.writes != 12 || m_words != 30 || s_words != 12) begin
      failures++; $display("write counts %0d %0d (%0d %0d)", mem_m.writes, mem_s.writes, m_words, s_words);
    end
    checks++;
    if (mem_m.stalls == 0 || mem_s.stalls == 0) begin failures++; $display("memory never stalled"); end
    checks++;
    if (m_next[0] != 10 || s_next[0] != 12) begin failures++; $display("sink took extra elements"); end
    // Full rate: 20 words in 20 consecutive cycles.
    go_f = 1'b1;
    wait (f_write);
    @(negedge clk);
    t0 = cyc;
    wait (f_done);
    t1 = cyc;
    checks++;
    if (t1 - t0 != 20) begin failures++; $display("20 words took %0d cycles", t1 - t0); end
    for (int i = 0; i < 20; i++) begin
      checks++;
      if (mem_f.read_word(4 * i) !== word_t'(i)) begin failures++; $display("full-rate word %0d wrong", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
