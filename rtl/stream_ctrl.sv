// stream_ctrl: the small state machine that starts the kernels of a
// streaming application and times the run.
//
// In the measured system a soft processor started the accelerators and read
// a timer; for a deployed system that role reduces to a state machine, which
// is what this block is. A start request makes it pulse kernel_go for one
// cycle; all kernels load their loop counters on that pulse. It then waits
// for the application's done signal (the write kernel has stored its last
// word) and counts the clock cycles of the run.
//
// States (this design's own encoding): IDLE -> GO (one cycle, kernel_go
// high) -> RUN (until app_done) -> IDLE. A start request in GO or RUN is
// ignored.
//
// Interface: start (request, sampled in IDLE), kernel_go (pulse to the
// kernels), app_done (level from the application), busy (GO or RUN),
// finished (set when a run ends, cleared by the next start), cycles (clock
// cycles from the kernel_go cycle to the last cycle of RUN, inclusive).
module stream_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        kernel_go,
  input  logic        app_done,
  output logic        busy,
  output logic        finished,
  output logic [31:0] cycles
);

  typedef enum logic [1:0] {
    S_IDLE = 2'd0,
    S_GO   = 2'd1,
    S_RUN  = 2'd2
  } state_e;

  state_e state;

  assign kernel_go = (state == S_GO);
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      finished <= 1'b0;
      cycles   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state    <= S_GO;
          finished <= 1'b0;
          cycles   <= '0;
        end
        S_GO: begin
          state  <= S_RUN;
          cycles <= cycles + 1'b1;
        end
        S_RUN: begin
          cycles <= cycles + 1'b1;
          if (app_done) begin
            state    <= S_IDLE;
            finished <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
