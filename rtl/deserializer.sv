// deserializer: turns the serial stream of kernel products back into N
// parallel words.
//
// On each clock edge with shift high, din enters the top of an N-word shift
// register and the older words move down one place, so after N shifts word 0
// holds the first value of the period. On an edge with load high the
// parallel output register takes the current view of the period, the N-1
// words already shifted in plus din itself (slot N-1), so loading in the
// same cycle as the last shift yields all N values. dout stays stable for
// the rest of the base period. The document gives the block (a delay line
// that deserialises into 55 parallel outputs); the separate output register
// and reset to zero are this design's choices.
module deserializer #(
  parameter int unsigned N = 55
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        shift,
  input  logic        load,
  input  logic [31:0] din,
  output logic [31:0] dout [N]
);

  logic [31:0] sr [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) sr[i] <= '0;
    end else if (shift) begin
      for (int i = 0; i < N - 1; i++) sr[i] <= sr[i+1];
      sr[N-1] <= din;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) dout[i] <= '0;
    end else if (load) begin
      for (int i = 0; i < N - 1; i++) dout[i] <= sr[i+1];
      dout[N-1] <= din;
    end
  end

endmodule
