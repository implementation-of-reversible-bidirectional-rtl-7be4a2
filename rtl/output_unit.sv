// output_unit: the n-bit output register. On each rising clock edge with
// d_valid high it captures the shifted word and the garbage bits that came
// with it, and raises q_valid for one cycle; otherwise it holds its contents
// and q_valid falls. Reset (asynchronous, active low) clears everything.
// The n-bit output register is the design's; registering the garbage bits
// alongside the word, the valid flag and the reset are this design's own.
module output_unit #(
  parameter int unsigned N  = 8,
  parameter int unsigned GW = rbs_pkg::total_garbage(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          d_valid,
  input  logic [N-1:0]  d_data,
  input  logic [GW-1:0] d_garbage,
  output logic          q_valid,
  output logic [N-1:0]  q_data,
  output logic [GW-1:0] q_garbage
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_valid   <= 1'b0;
      q_data    <= '0;
      q_garbage <= '0;
    end else begin
      q_valid <= d_valid;
      if (d_valid) begin
        q_data    <= d_data;
        q_garbage <= d_garbage;
      end
    end
  end
endmodule
