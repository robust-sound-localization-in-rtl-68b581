// cos_table: cosine of a binary angle on a 1024-step circle,
// c = round(2**30 * cos(2*pi*m/1024)).
//
// A quarter wave (257 entries) is built at elaboration from tdoa_pkg::cos_q30
// and folded into the other three quadrants by symmetry. Combinational, no
// state. The FFT twiddle factors and the Hanning window share this table, so
// the three segment lengths (256, 512, 1024) all index it with m = k*1024/N.
// The document does not describe how twiddles or window values are produced;
// the table and its 30-bit precision are this design's own.
module cos_table
  import tdoa_pkg::*;
(
  input  logic        [ADDR_W-1:0] m,
  output logic signed [31:0]       c
);
  logic signed [31:0] quarter [0:256];

  for (genvar i = 0; i <= 256; i++) begin : g_rom
    localparam int V = cos_q30(i);
    assign quarter[i] = V;
  end

  logic [8:0] idx;
  logic       neg;

  always_comb begin
    case (m[9:8])
      2'd0: begin idx = {1'b0, m[7:0]};           neg = 1'b0; end
      2'd1: begin idx = 9'd256 - {1'b0, m[7:0]};  neg = 1'b1; end
      2'd2: begin idx = {1'b0, m[7:0]};           neg = 1'b1; end
      default: begin idx = 9'd256 - {1'b0, m[7:0]}; neg = 1'b0; end
    endcase
    c = neg ? -quarter[idx] : quarter[idx];
  end
endmodule
