// sv_memory: on-chip store of the trained SVM model.
//
// Holds NUM_SV support vectors of NUM_FEAT binary32 features each and one
// binary32 coefficient per support vector (the Lagrange multiplier times the
// class label, y_i * alpha_i). All entries are visible at once on the sv and
// alpha outputs, which feed the serializer of the kernel channel.
// The document keeps these values in internal FPGA memory but does not list
// them, so the store is loaded through a write port, one word per cycle:
//   wr_sel < NUM_FEAT  writes feature wr_sel of support vector wr_addr,
//   wr_sel = NUM_FEAT  writes the coefficient of support vector wr_addr.
// Writes take effect at the clock edge; reset clears every entry. The
// write port and reset are this design's choices.
module sv_memory #(
  parameter int unsigned NUM_SV   = 55,
  parameter int unsigned NUM_FEAT = 2
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        wr_en,
  input  logic [$clog2(NUM_SV)-1:0]   wr_addr,
  input  logic [$clog2(NUM_FEAT+1)-1:0] wr_sel,
  input  logic [31:0]                 wr_data,
  output logic [31:0]                 sv    [NUM_SV][NUM_FEAT],
  output logic [31:0]                 alpha [NUM_SV]
);

  localparam int unsigned FW = (NUM_FEAT > 1) ? $clog2(NUM_FEAT) : 1;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_SV; i++) begin
        alpha[i] <= '0;
        for (int f = 0; f < NUM_FEAT; f++) sv[i][f] <= '0;
      end
    end else if (wr_en && (32'(wr_addr) < NUM_SV)) begin
      if (32'(wr_sel) == NUM_FEAT)
        alpha[wr_addr] <= wr_data;
      else if (32'(wr_sel) < NUM_FEAT)
        sv[wr_addr][FW'(wr_sel)] <= wr_data;
    end
  end

endmodule
