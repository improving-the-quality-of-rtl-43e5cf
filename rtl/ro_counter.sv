// ro_counter: counts the rising edges of one selected ring oscillator.
//
// The counter is clocked by the oscillator itself, so it can follow
// frequencies far above the system clock. Its clear comes from the system
// clock domain and is asynchronous; the controller only clears while the
// oscillators are stopped, then lets them run for a fixed window and stops
// them again, so the count is static when the system domain reads it and no
// synchronizer is needed. The count saturates at all ones. The counter
// structure is this design's choice; the method only needs a frequency
// measure per oscillator.
`timescale 1ns / 1ps
module ro_counter #(
  parameter int CNT_W = 16
) (
  input  logic             ro_clk,
  input  logic             clr,
  output logic [CNT_W-1:0] count
);

  always_ff @(posedge ro_clk or posedge clr) begin
    if (clr)
      count <= '0;
    else if (count != '1)
      count <= count + 1'b1;
  end

endmodule
