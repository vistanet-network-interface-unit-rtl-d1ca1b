// irq_ctrl: the NIU interrupt controller.
//
// The SPARC integer unit takes a 4-bit interrupt request level. The NIU
// raises six levels, highest first: 7 ring-bound packet events, 6 network-
// bound data port events, 5 RingP finished, 4 HIPPI source packet sent,
// 3 command port events, 2 tick clock overflow. Each event (already gated by
// its enable bit) sets the pending flag of its level; irl_o shows the
// highest pending level, 0 when none. A pending flag is cleared by its
// clear_i bit, which the register block raises when the processor reads the
// status register that holds the cause; a new event in the same clock wins.
// The clearing rule is this design's choice.
module irq_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] event_i,   // bit n = event on level n (bits 0,1 unused)
  input  logic [7:0] clear_i,
  output logic [7:0] pending_o,
  output logic [3:0] irl_o
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pending_o <= '0;
    else        pending_o <= ((pending_o & ~clear_i) | event_i) & 8'hfc;
  end

  always_comb begin
    irl_o = 4'd0;
    for (int l = 2; l < 8; l++) if (pending_o[l]) irl_o = 4'(l);
  end
endmodule
