// sync_2ff: two-flip-flop synchronizer for a level signal entering the clock domain
// of clk. The output follows the input two to three clk edges later. Only for signals
// that change slowly compared with clk (status levels), or for one bit of a Gray code.
module sync_2ff #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,   // asynchronous, active low; output resets to 0
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
