// regfile: integer register file, kept outside the pipelines as in LEON3.
//
// NREG words of XLEN bits, two read ports and one write port. Reads are
// synchronous: an address presented with re high is read at the clock edge
// and the data is held on rdata until the next enabled read, which matches the
// block RAMs an FPGA register file is built from. A read of the register being
// written in the same cycle returns the new value (write first). Register 0
// always reads as zero and ignores writes. The array has no reset.
//
// The document places the register file outside the integer pipeline, reads
// it from decode and writes it from write-back; its size, read timing and the
// zero register are this design's own choices.
module regfile
  import ft_pkg::*;
#(
  parameter int NREG_P = NREG,
  parameter int XLEN_P = XLEN,
  localparam int AW    = $clog2(NREG_P)
) (
  input  logic              clk,
  input  logic              re,
  input  logic [AW-1:0]     raddr1,
  input  logic [AW-1:0]     raddr2,
  output logic [XLEN_P-1:0] rdata1,
  output logic [XLEN_P-1:0] rdata2,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [XLEN_P-1:0] wdata
);

  logic [XLEN_P-1:0] mem [NREG_P];

  function automatic logic [XLEN_P-1:0] rd_port(input logic [AW-1:0] a,
                                                input logic [XLEN_P-1:0] stored);
    if (a == '0)                return '0;
    else if (we && (waddr == a)) return wdata;
    else                        return stored;
  endfunction

  always_ff @(posedge clk) begin
    if (we && (waddr != '0)) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) begin
      rdata1 <= rd_port(raddr1, mem[raddr1]);
      rdata2 <= rd_port(raddr2, mem[raddr2]);
    end
  end

endmodule
