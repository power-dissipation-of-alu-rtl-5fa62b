// Output response analyzer of the BIST.
//
// For every test pattern the Euclid and Stein engines compute the same
// GCD by two unrelated methods, so any difference between them reveals a
// fault in one of the datapaths. When valid is pulsed, res_a and res_b are
// compared: last_match shows the outcome, pass (the bist_out signal) stays
// high only while every comparison since reset has matched, and count
// records how many patterns were compared (saturating at 2**16-1).
// The reference design names only the pass output; what is compared, the
// sticky flag and the counter are this design's choices.
//
// Timing: outputs update on the clock edge at which valid is high.
// rst is synchronous and active high; it sets pass and last_match to 1.
module bist_ora #(
  parameter int unsigned WIDTH = gcd_alu_pkg::DATA_WIDTH
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             valid,
  input  logic [WIDTH-1:0] res_a,
  input  logic [WIDTH-1:0] res_b,
  output logic             pass,
  output logic             last_match,
  output logic [15:0]      count
);

  logic match;

  always_comb begin
    match = (res_a == res_b);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pass       <= 1'b1;
      last_match <= 1'b1;
      count      <= '0;
    end else if (valid) begin
      last_match <= match;
      pass       <= pass & match;
      if (count != 16'hFFFF) count <= count + 1'b1;
    end
  end

endmodule
