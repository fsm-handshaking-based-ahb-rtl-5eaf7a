// sync_2ff: two flip-flop synchroniser.
//
// Brings a signal that is asynchronous to clk into the clk domain. The first
// flop may go metastable; the second gives it one full clock period to
// settle before the value is used downstream, which raises the mean time
// between failures. Each bit is synchronised on its own, so a multi-bit
// input must be a value that changes one bit at a time (a toggle flag, a
// Gray code). Latency is two clk edges. Both flops reset to 0 on the
// asynchronous active-low reset.
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
