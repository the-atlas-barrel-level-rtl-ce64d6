// rst_sync: reset synchronizer, one per clock region.
//
// Asserts asynchronously with rst_n and releases two clk edges after rst_n
// rises, so that all flip-flops of a region leave reset on the same edge.
module rst_sync (
  input  logic clk,
  input  logic rst_n,
  output logic rst_n_sync
);
  logic r1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1 <= 1'b0; rst_n_sync <= 1'b0;
    end else begin
      r1 <= 1'b1; rst_n_sync <= r1;
    end
  end
endmodule
