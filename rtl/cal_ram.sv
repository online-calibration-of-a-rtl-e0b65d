// cal_ram: working memory of the calibration processor.
//
// A DEPTH x W array with one synchronous write port and one asynchronous
// read port. The top uses three of them: the mismatch information (e_a - a
// and f_a per ADC level), the preconditioned E-ADC histogram H_e', and the
// INL values. The document budgets memory for these data but does not give
// its organisation; a plain register-file style array is this design's
// choice. Contents are not reset: every word is written before it is read.
module cal_ram #(
  parameter int unsigned AW = 12,
  parameter int unsigned W  = 32
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
