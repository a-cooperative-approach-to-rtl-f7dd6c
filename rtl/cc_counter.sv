// cc_counter: the confident counter (CC) of a normal cell.
//
// A 5-bit counter, as in the paper, incremented by the controller's INC
// line each time the tournament winner beats the cell's best fitness. Its
// value is sent to the group leader together with the probability vector.
// The paper gives no rule for the 32nd increment; this design saturates
// at 31 so that a cell that has improved often never looks worse than one
// that has improved rarely. Reset clears it, as in the paper's cell pseudocode.
module cc_counter
  import cocga_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic inc,
  output cc_t  cc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 cc <= '0;
    else if (inc && (cc != '1)) cc <= cc + 1'b1;
  end

endmodule
