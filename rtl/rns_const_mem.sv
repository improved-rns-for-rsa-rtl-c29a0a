// rns_const_mem: memory of the precomputed constants of one residue channel.
//
// The improved algorithm folds several constants of the classic RNS
// Montgomery multiplication into single products (for example
// |-N^-1 * M_i^-1|_mi instead of |-N^-1|_mi and |M_i^-1|_mi), so each channel
// keeps one word per combined constant.  The constants depend on the RSA
// modulus N, so the memory is written by the host (write port) before use and
// read by the channel's sequencing logic.
//
// Interface: synchronous write (we_i, waddr_i, wdata_i), asynchronous read
// (raddr_i -> rdata_o).  A read of an address beyond DEPTH returns zero.
// Contents are not reset.  The organisation (one register-array memory per
// channel, asynchronous read) is this design's choice.
module rns_const_mem #(
  parameter int unsigned WIDTH = 132,
  parameter int unsigned DEPTH = 12,
  parameter int unsigned AW    = 8
) (
  input  logic             clk,
  input  logic             we_i,
  input  logic [AW-1:0]    waddr_i,
  input  logic [WIDTH-1:0] wdata_i,
  input  logic [AW-1:0]    raddr_i,
  output logic [WIDTH-1:0] rdata_o
);

  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_i && (32'(waddr_i) < DEPTH)) mem[waddr_i[IW-1:0]] <= wdata_i;
  end

  assign rdata_o = (32'(raddr_i) < DEPTH) ? mem[raddr_i[IW-1:0]] : '0;

endmodule
