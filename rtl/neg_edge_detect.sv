// neg_edge_detect: one-clock pulse on each falling edge of a level input.
//
// Used on the field bit of the video timing codes: the field bit falls once
// per interlaced frame (second field to first field), during vertical
// blanking, and that pulse marks the start of a new frame for the rest of the
// pipeline. The input is registered once and compared with its previous
// value; the pulse is registered, so it follows the edge by one clock.
// The reset value of the history is 0, so a level that is high out of reset
// must first rise and then fall to produce a pulse.
module neg_edge_detect (
  input  logic clk,
  input  logic rst,
  input  logic sig,
  output logic fall
);

  logic sig_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      sig_q <= 1'b0;
      fall  <= 1'b0;
    end else begin
      sig_q <= sig;
      fall  <= sig_q && !sig;
    end
  end

endmodule
