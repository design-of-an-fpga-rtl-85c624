// sync_2ff -- two-flip-flop synchronizer for a level signal.
//
// Brings a slowly changing level (a software enable or an acknowledge flag)
// from another clock domain into the domain of clk. The output follows the
// input two clk rising edges later. Reset clears both stages. A helper of the
// Array Formatter's clock-domain crossings; its structure is the usual one,
// not taken from any particular description.
module sync_2ff #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
