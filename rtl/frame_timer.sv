// Frame timer: raises the new-frame interrupt of the DVS interface once per
// frame interval t_frame = 1/FPS.
//
// A counter runs from 0 to period_i-1 cycles and emits a one-cycle tick when
// it wraps. The documented system uses an on-chip timer/counter for this; its
// insides are not described, so this is the simplest counter that does it.
// period_i = 0 or enable_i = 0 stops the timer and clears the count.
module frame_timer #(
  parameter int unsigned CW = 32
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          enable_i,
  input  logic [CW-1:0] period_i,
  output logic          tick_o
);

  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cnt_q  <= '0;
      tick_o <= 1'b0;
    end else if (!enable_i || period_i == '0) begin
      cnt_q  <= '0;
      tick_o <= 1'b0;
    end else if (cnt_q >= period_i - 1'b1) begin
      cnt_q  <= '0;
      tick_o <= 1'b1;
    end else begin
      cnt_q  <= cnt_q + 1'b1;
      tick_o <= 1'b0;
    end
  end

endmodule
