// subt: error feedback unit.
//
// Forms err = dest - act, the difference between the destination speed and
// the measured speed, and saturates it to the ERR_W-bit signed range of the
// compensator input ([-512, 511] for the default 10 bits). dest is an
// unsigned speed (counts per sampling period), act a signed DATA_W-bit
// velocity. The subtraction is the specification's; the saturation and the
// registered output are this design's choices.
// Timing: err is registered, one clock after its inputs. clear_cnt and
// synchronous active-high reset zero it.
module subt #(
  parameter int unsigned ACT_W  = 32,
  parameter int unsigned DEST_W = 10,
  parameter int unsigned ERR_W  = 10
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    clear_cnt,
  input  logic signed [ACT_W-1:0] act,
  input  logic        [DEST_W-1:0] dest,
  output logic signed [ERR_W-1:0] err
);

  localparam int unsigned DW = ACT_W + 2;
  localparam logic signed [DW-1:0] EMAX = DW'((1 << (ERR_W - 1)) - 1);
  localparam logic signed [DW-1:0] EMIN = -DW'(1 << (ERR_W - 1));

  logic signed [DW-1:0] diff;

  always_comb diff = $signed({{(DW-DEST_W){1'b0}}, dest}) - DW'(act);

  always_ff @(posedge clk) begin
    if (rst || clear_cnt)  err <= '0;
    else if (diff > EMAX)  err <= EMAX[ERR_W-1:0];
    else if (diff < EMIN)  err <= EMIN[ERR_W-1:0];
    else                   err <= diff[ERR_W-1:0];
  end

endmodule
