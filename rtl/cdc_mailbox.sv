// cdc_mailbox: one-word handshake between two unrelated clock domains.
//
// The source side writes a word into a holding register and flips a request
// toggle. The toggle is synchronised into the destination domain (sync_2ff);
// while it differs from the destination's acknowledge toggle the word is
// valid there. Taking the word flips the acknowledge toggle, which is
// synchronised back and frees the mailbox for the next word. The holding
// register does not change while the word is in flight, so its bits can be
// read in the destination domain without their own synchronisers.
//
// Interface:  source:      src_free=1 means src_put may be pulsed with src_data.
//             destination: dst_valid=1 means dst_data is good; pulse dst_take.
// Timing:     src_put -> dst_valid after 2 to 3 dst_clk edges;
//             dst_take -> src_free after 2 to 3 src_clk edges.
// Both resets are assumed to be asserted together (one system reset).
module cdc_mailbox #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             src_clk,
  input  logic             src_rst_n,
  input  logic             src_put,
  input  logic [WIDTH-1:0] src_data,
  output logic             src_free,

  input  logic             dst_clk,
  input  logic             dst_rst_n,
  output logic             dst_valid,
  output logic [WIDTH-1:0] dst_data,
  input  logic             dst_take
);

  logic             req_tgl, ack_tgl;   // launched in src / dst domain
  logic             req_tgl_dst;        // req_tgl seen in the dst domain
  logic             ack_tgl_src;        // ack_tgl seen in the src domain
  logic [WIDTH-1:0] hold;

  // Source domain
  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n) begin
      req_tgl <= 1'b0;
      hold    <= '0;
    end else if (src_put) begin
      req_tgl <= ~req_tgl;
      hold    <= src_data;
    end
  end

  sync_2ff #(.WIDTH(1)) u_ack_sync (
    .clk(src_clk), .rst_n(src_rst_n), .d(ack_tgl), .q(ack_tgl_src)
  );

  assign src_free = (req_tgl == ack_tgl_src);

  // Destination domain
  sync_2ff #(.WIDTH(1)) u_req_sync (
    .clk(dst_clk), .rst_n(dst_rst_n), .d(req_tgl), .q(req_tgl_dst)
  );

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) ack_tgl <= 1'b0;
    else if (dst_take) ack_tgl <= ~ack_tgl;
  end

  assign dst_valid = (req_tgl_dst != ack_tgl);
  assign dst_data  = hold;

  // Handshake rules: no write into a full mailbox, no take from an empty one.
  a_put_when_free: assert property (@(posedge src_clk) disable iff (!src_rst_n)
                                    src_put |-> src_free)
    else $error("cdc_mailbox: put while not free");
  a_take_when_valid: assert property (@(posedge dst_clk) disable iff (!dst_rst_n)
                                      dst_take |-> dst_valid)
    else $error("cdc_mailbox: take while not valid");

endmodule
