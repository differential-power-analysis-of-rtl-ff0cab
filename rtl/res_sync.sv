// res_sync: reset synchroniser. The external reset input res_in is
// high-active and asynchronous; the output nres is low-active, asserted
// at once when res_in rises and released two clock edges after res_in
// falls, synchronously to clk. The low-active output follows the design;
// the two-stage release is this design's choice. The flops are reset
// asynchronously and clocked synchronously by design; a lint remark about
// a signal flopped both ways refers to exactly this and stands.
module res_sync (
  input  logic clk,
  input  logic res_in,
  output logic nres
);

  logic [1:0] sync_q;

  always_ff @(posedge clk or posedge res_in) begin
    if (res_in) sync_q <= 2'b00;
    else        sync_q <= {sync_q[0], 1'b1};
  end

  assign nres = sync_q[1];

endmodule
