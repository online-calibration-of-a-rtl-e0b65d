// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// On a one-cycle 'start' it latches 'dividend' (NW bits) and 'divisor'
// (DW bits) and, NW clocks later, raises 'done' for one cycle with
// quotient = floor(dividend / divisor) (NW bits) and the remainder. A zero
// divisor returns an all-ones quotient. 'busy' is high while it iterates.
// The calibration arithmetic uses it for every division (f_a, offset
// fraction, alpha, the ratios of the product in eq. (36)); the document only
// asks for "basic arithmetic operations", so the shift-subtract structure
// is this design's choice for a small DSP.
//
// Lint note: the top bit of the partial-remainder register only holds the
// carry of each trial subtraction and is never read out, so it is reported
// as partly unused.
module seq_divider #(
  parameter int unsigned NW = 32,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quotient,
  output logic [DW-1:0] remainder
);

  localparam int unsigned CW = $clog2(NW + 1);

  logic [NW-1:0] q_r;
  logic [DW:0]   rem_r;
  logic [DW-1:0] den_r;
  logic [CW-1:0] cnt_r;

  logic [DW:0]   trial;
  logic [DW:0]   shifted;

  always_comb begin
    shifted = {rem_r[DW-1:0], q_r[NW-1]};
    trial   = shifted - {1'b0, den_r};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_r   <= '0;
      rem_r <= '0;
      den_r <= '0;
      cnt_r <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        q_r   <= dividend;
        rem_r <= '0;
        den_r <= divisor;
        cnt_r <= CW'(NW);
        busy  <= 1'b1;
      end else if (busy) begin
        if (!trial[DW]) begin
          rem_r <= trial;
          q_r   <= {q_r[NW-2:0], 1'b1};
        end else begin
          rem_r <= shifted;
          q_r   <= {q_r[NW-2:0], 1'b0};
        end
        cnt_r <= cnt_r - 1'b1;
        if (cnt_r == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient  = q_r;
  assign remainder = rem_r[DW-1:0];

endmodule
