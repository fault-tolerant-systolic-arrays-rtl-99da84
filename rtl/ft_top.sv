// ft_top: the two fault-tolerant systolic arrays side by side.
//
// lin_*: a linear array of N = 4 processing elements with three residue
//        arrays (bases 5, 11, 19), per-position fault localization and the
//        network that corrects two consecutive errors, including faults
//        whose error sign follows the data (ft_linear, ECN_MODE 3).
// arr_*: a horizontal-computing 2 x 3 bidimensional array with the same three
//        residue grids, per-row correction and the faulty column identifier
//        built from column check sums (ft_2d, two consecutive errors of
//        one sign, ECN_MODE 2).
// ak_*:  a narrow linear array (4-bit samples and weights, 10-bit results)
//        with the "any kind" double-error network (ft_linear, ECN_MODE 4).
//        Bases 5, 11, 19 cover two simultaneous errors only up to 10 result
//        bits, so this network sits on its own narrow array; the data widths
//        here are this design's choice.
// The two arrays share only clock and reset; each has its own host-side
// ports (inputs, weights, 'clear' of the stored first error, fault flags).
// The *_y_err and arr_cs_err inputs inject additive errors for test and must
// be tied to zero in use. Timing of each half is that of ft_linear / ft_2d.
module ft_top
  import ft_pkg::*;
#(
  parameter int unsigned LIN_N = 4,   // PEs of the linear array
  parameter int unsigned ROWS  = 2,   // rows of the bidimensional array
  parameter int unsigned COLS  = 3,   // columns of the bidimensional array
  parameter int unsigned AK_N  = 4    // PEs of the any-kind array
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  // linear array
  input  logic                                    lin_clear,
  input  logic [DATA_W-1:0]                       lin_x_in,
  input  logic [LIN_N-1:0][DATA_W-1:0]            lin_w_in,
  input  logic [LIN_N-1:0][RES_W-1:0]             lin_y_err,
  output logic [RES_W-1:0]                        lin_y_out,
  output logic [RES_W-1:0]                        lin_y_raw,
  output sel_e                                    lin_sel,
  output logic                                    lin_detected,
  output logic                                    lin_uncorrectable,
  output logic                                    lin_stored,
  output logic [LIN_N-1:0]                        lin_pe_fault,
  output logic [LIN_N-1:0]                        lin_pe_first,
  // bidimensional array
  input  logic                                    arr_clear,
  input  logic [ROWS-1:0][DATA_W-1:0]             arr_x_in,
  input  logic [COLS-1:0][DATA_W-1:0]             arr_w_in,
  input  logic [ROWS-1:0][COLS-1:0][RES_W-1:0]    arr_y_err,
  input  logic [ROWS-1:0][COLS-1:0][CHK_W-1:0]    arr_cs_err,
  output logic [ROWS-1:0][RES_W-1:0]              arr_y_out,
  output logic [ROWS-1:0][RES_W-1:0]              arr_y_raw,
  output sel_e [ROWS-1:0]                         arr_sel,
  output logic [ROWS-1:0]                         arr_detected,
  output logic [ROWS-1:0]                         arr_uncorrectable,
  output logic [ROWS-1:0]                         arr_stored,
  output logic [ROWS-1:0]                         arr_row_fault,
  output logic [COLS-1:0]                         arr_col_fault,
  output logic [COLS-1:0]                         arr_col_first,
  // any-kind array
  input  logic [AK_DW-1:0]                        ak_x_in,
  input  logic [AK_N-1:0][AK_DW-1:0]              ak_w_in,
  input  logic [AK_N-1:0][AK_YW-1:0]              ak_y_err,
  output logic [AK_YW-1:0]                        ak_y_out,
  output logic [AK_YW-1:0]                        ak_y_raw,
  output sel_e                                    ak_sel,
  output logic                                    ak_detected,
  output logic                                    ak_uncorrectable,
  output logic [AK_N-1:0]                         ak_pe_fault,
  output logic [AK_N-1:0]                         ak_pe_first
);

  ft_linear #(
    .N(LIN_N), .DW(DATA_W), .YW(RES_W), .RW(DIG_W), .NB(N_BASES),
    .BASES(BASES3), .ECN_MODE(3), .LOCALIZE(1'b1)
  ) u_lin (
    .clk, .rst_n, .clear(lin_clear), .x_in(lin_x_in), .w_in(lin_w_in),
    .y_err(lin_y_err), .y_out(lin_y_out), .y_raw(lin_y_raw), .sel(lin_sel),
    .detected(lin_detected), .uncorrectable(lin_uncorrectable),
    .stored(lin_stored), .pe_fault(lin_pe_fault),
    .pe_first(lin_pe_first)
  );

  ft_2d #(
    .R(ROWS), .C(COLS), .DW(DATA_W), .YW(RES_W), .CW(CHK_W), .RW(DIG_W),
    .NB(N_BASES), .BASES(BASES3), .ECN_MODE(2), .VARIANT(CHK_A)
  ) u_arr (
    .clk, .rst_n, .clear(arr_clear), .x_in(arr_x_in), .w_in(arr_w_in),
    .y_err(arr_y_err), .cs_err(arr_cs_err), .y_out(arr_y_out),
    .y_raw(arr_y_raw), .sel(arr_sel), .detected(arr_detected),
    .uncorrectable(arr_uncorrectable), .stored(arr_stored),
    .row_fault(arr_row_fault), .col_fault(arr_col_fault),
    .col_first(arr_col_first)
  );

  ft_linear #(
    .N(AK_N), .DW(AK_DW), .YW(AK_YW), .RW(DIG_W), .NB(N_BASES),
    .BASES(BASES3), .ECN_MODE(4), .LOCALIZE(1'b1)
  ) u_ak (
    .clk, .rst_n, .clear(1'b0), .x_in(ak_x_in), .w_in(ak_w_in),
    .y_err(ak_y_err), .y_out(ak_y_out), .y_raw(ak_y_raw), .sel(ak_sel),
    .detected(ak_detected), .uncorrectable(ak_uncorrectable),
    .stored(), .pe_fault(ak_pe_fault), .pe_first(ak_pe_first)
  );

endmodule
