// rst_sync - reset synchroniser: asserts asynchronously with rst_n and
// releases two clk edges after rst_n rises, so every clock domain leaves
// reset on its own clock.
module rst_sync (
  input  logic clk,
  input  logic rst_n,
  output logic rst_n_o
);
  logic s1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {rst_n_o, s1} <= 2'b00;
    else        {rst_n_o, s1} <= {s1, 1'b1};
  end
endmodule
