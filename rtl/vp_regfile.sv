// vp_regfile: generic register-file memory with two read ports and one write
// port, used for both halves of the VPIAC register file (the header memory
// and the significand memory).
//
// Each cycle two words can be read and one written, which is what the
// coprocessor's register file provides. Reads are combinational (the address
// is presented and the word is available in the same cycle); the write is
// taken on the rising clock edge. A read of the address being written returns
// the old word. The combinational read and the write-before-read ordering are
// this design's choices. No reset: the contents are loaded by the host.
//
// Parameters: DEPTH words of WIDTH bits.
module vp_regfile #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    ra0,
  output logic [WIDTH-1:0] rd0,
  input  logic [AW-1:0]    ra1,
  output logic [WIDTH-1:0] rd1,
  input  logic             we,
  input  logic [AW-1:0]    wa,
  input  logic [WIDTH-1:0] wd
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wd;
  end

  assign rd0 = mem[ra0];
  assign rd1 = mem[ra1];
endmodule
