// delay_line: fixed-length shift register (FIFO with equal read and write
// rate) used in the decoder pipeline.
//
// In a fully pipelined decoder that accepts one block per clock, every link
// that must hand a block's data to a later block of the same stream holds it
// for a whole number of half-iteration times; these are the FIFOs that the
// area model of the architecture lists beside the compute kernels. The same
// unit also carries each block's channel values alongside an HI core.
//
// Interface: d is sampled on every rising clock edge; q is d delayed by DEPTH
// cycles (DEPTH = 0 gives a wire). Reset clears the contents, so a link
// carries zero (invalid) data until it has filled.
module delay_line #(
  parameter int W     = 8,
  parameter int DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_reg
    logic [W-1:0] sr [DEPTH];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
      end else begin
        sr[0] <= d;
        for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
      end
    end

    assign q = sr[DEPTH-1];
  end

endmodule
