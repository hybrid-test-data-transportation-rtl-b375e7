// cut_scan_model: behavioural model of the scan chains of one core under
// test, for simulation only. The core has P scan chains of LEN cells. While
// shift is high, every chain moves one place towards its output: cell 0
// takes si[c] and so[c] is the last cell. While capture is high, every chain
// loads the capture function of tb_hts_pkg::cap_bit, standing in for the
// core's logic. Reset clears all cells.
module cut_scan_model
  import tb_hts_pkg::*;
#(
  parameter int unsigned P   = 2,
  parameter int unsigned LEN = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         capture,
  input  logic [P-1:0] si,
  output logic [P-1:0] so
);
  logic [LEN-1:0] chain [P];

  always_comb begin
    for (int c = 0; c < P; c++) so[c] = chain[c][LEN-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < P; c++) chain[c] <= '0;
    end else if (shift) begin
      for (int c = 0; c < P; c++) chain[c] <= {chain[c][LEN-2:0], si[c]};
    end else if (capture) begin
      for (int c = 0; c < P; c++)
        for (int b = 0; b < LEN; b++)
          chain[c][b] <= cap_bit(64'(chain[c]), LEN, b, c);
    end
  end
endmodule
