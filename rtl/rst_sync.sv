// rst_sync -- reset synchronizer: asynchronous assertion, synchronous release.
//
// rst_n_out goes low as soon as rst_n_in goes low and returns high two rising
// edges of clk after rst_n_in is released, so every clock domain of the
// Array Formatter leaves reset cleanly on its own clock. A helper of this
// design, not something the formatter's description spells out.
module rst_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);
  logic stage;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) begin
      stage     <= 1'b0;
      rst_n_out <= 1'b0;
    end else begin
      stage     <= 1'b1;
      rst_n_out <= stage;
    end
  end
endmodule
