// rst_sync: reset synchronizer for one clock domain.
//
// Asserts the local reset as soon as the request rises and releases it two
// clock edges after the request falls, so the release is synchronous to clk.
// Used to carry the front-end reset and the software FIFO reset into the ADC
// clock domain. Output rst_o is active high.
module rst_sync (
  input  logic clk,
  input  logic rst_req,
  output logic rst_o
);
  logic [1:0] sr;

  always_ff @(posedge clk or posedge rst_req) begin
    if (rst_req) sr <= 2'b11;
    else         sr <= {sr[0], 1'b0};
  end

  assign rst_o = sr[1];
endmodule
