// input_unit: the input register of the shifter.
// On a rising clock edge with in_valid high it captures the data word, the
// shift amount k, the direction DIR and the mode MODE; otherwise it holds
// them. in_valid is registered too, so q_valid marks a freshly captured
// operand one cycle after it was presented. Reset (asynchronous, active low)
// clears every field so that nothing downstream reads an unset value.
// The n-bit input register and its control inputs are the design's; the load
// strobe, the valid flag and the reset are this design's own choices.
module input_unit #(
  parameter int unsigned N  = 8,
  parameter int unsigned KW = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [N-1:0]      data_in,
  input  logic [KW-1:0]     k_in,
  input  logic              dir_in,
  input  rbs_pkg::mode_e    mode_in,
  output logic              q_valid,
  output logic [N-1:0]      q_data,
  output logic [KW-1:0]     q_k,
  output logic              q_dir,
  output rbs_pkg::mode_e    q_mode
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_valid <= 1'b0;
      q_data  <= '0;
      q_k     <= '0;
      q_dir   <= 1'b0;
      q_mode  <= rbs_pkg::MODE_LOGICAL;
    end else begin
      q_valid <= in_valid;
      if (in_valid) begin
        q_data <= data_in;
        q_k    <= k_in;
        q_dir  <= dir_in;
        q_mode <= mode_in;
      end
    end
  end
endmodule
