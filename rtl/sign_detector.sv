// Sign detection: turns a DC-free noise sample into one raw random bit.
//
// Implements b = (1 + sign(v)) / 2, registered: a positive sample gives 1, a negative one
// 0. The document's formula gives 1/2 for an exact zero; this design maps zero to 1.
// One bit per in_valid_i, one clock of latency.
module sign_detector #(
  parameter int unsigned W = 26
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid_i,
  input  logic signed [W-1:0] in_i,
  output logic                bit_valid_o,
  output logic                bit_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_valid_o <= 1'b0;
      bit_o       <= 1'b0;
    end else begin
      bit_valid_o <= in_valid_i;
      if (in_valid_i) bit_o <= (in_i >= 0);
    end
  end

endmodule
