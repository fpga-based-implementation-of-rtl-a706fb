// strobe_sync: brings a level from the host side into the controller clock
// domain with two flip-flops and reports its rising edge as a one-cycle pulse.
// 'level' is the synchronised copy; 'rise' is high for one clock, three clocks
// after the input goes high. Reset clears both stages. A helper of this design.
module strobe_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic async_in,
  output logic level,
  output logic rise
);
  logic [2:0] sync_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_q <= '0;
    else        sync_q <= {sync_q[1:0], async_in};
  end

  assign level = sync_q[1];
  assign rise  = sync_q[1] & ~sync_q[2];
endmodule
