// input_fsm: the command input state machine. The host puts a data descriptor
// and a data byte on the input lines and raises the data ready strobe. The
// strobe is synchronised; on its rising edge the FSM makes the decoder copy
// both bytes into its buffers (LATCH), then starts it (GO) and waits until
// the decoder is idle again before it listens for the next strobe.
//
// Timing: 'latch' is high in the fourth clock after the strobe rises, 'go' one clock
// later. The host keeps descriptor and byte stable while the strobe is high
// and leaves at least 100 clocks (2 us) between strobes, the longest decode
// (a chirp setting, which runs the ramp-rate division); a strobe that arrives
// while a command is still being decoded is dropped and counted in 'overruns'.
// The document names the FSM and its strobe input; the handshake is this
// design's.
module input_fsm (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       data_ready_strobe,
  input  logic       dec_busy,
  output logic       latch,
  output logic       go,
  output logic [7:0] overruns
);
  typedef enum logic [1:0] {I_IDLE, I_LATCH, I_GO, I_WAIT} istate_e;
  istate_e state;
  logic    rise, level_unused;

  strobe_sync u_sync (.clk, .rst_n, .async_in(data_ready_strobe), .level(level_unused), .rise);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= I_IDLE;
      overruns <= '0;
    end else begin
      unique case (state)
        I_IDLE:  if (rise) state <= I_LATCH;
        I_LATCH: state <= I_GO;
        I_GO:    state <= I_WAIT;
        default: if (!dec_busy) state <= I_IDLE;
      endcase
      if (rise && state != I_IDLE && overruns != 8'hFF) overruns <= overruns + 8'd1;
    end
  end

  assign latch = (state == I_LATCH);
  assign go    = (state == I_GO);

  logic unused_level;
  assign unused_level = level_unused;
endmodule
