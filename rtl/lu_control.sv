// lu_control: loop and control logic of the LU engine.
//
// A finite state machine that tracks the progress of the units and keeps
// them in step. For each elimination step j = 0..N-1 it runs, one after the
// other, the pivot search, the pivot update / row interchange and the row
// update, each started by a one-cycle start pulse and finished by that
// unit's done pulse. Before the first step it waits for the matrix to be
// loaded; after the last it starts the output stream, and when that is
// done it re-initialises the row lookup table and returns to loading.
//
// Interface: phase selects which unit owns the matrix memory. j and every
// start pulse change on the same clock edge, so a unit sees its j together
// with start.
//
// A finite state machine tracking the units follows the published
// architecture; its states and the start/done handshake are this design's.
module lu_control
  import lu_pkg::*;
#(
  parameter int unsigned N = 10
) (
  input  logic   clk,
  input  logic   reset,
  input  logic   load_done,
  input  logic   piv_done,
  input  logic   pupd_done,
  input  logic   upd_done,
  input  logic   out_done,
  output phase_e phase,
  output idx_t   j,
  output logic   start_piv,
  output logic   start_pupd,
  output logic   start_upd,
  output logic   start_out,
  output logic   lut_init
);

  always_ff @(posedge clk) begin
    if (reset) begin
      phase      <= PH_LOAD;
      j          <= '0;
      start_piv  <= 1'b0;
      start_pupd <= 1'b0;
      start_upd  <= 1'b0;
      start_out  <= 1'b0;
      lut_init   <= 1'b0;
    end else begin
      start_piv  <= 1'b0;
      start_pupd <= 1'b0;
      start_upd  <= 1'b0;
      start_out  <= 1'b0;
      lut_init   <= 1'b0;
      unique case (phase)
        PH_LOAD: if (load_done) begin
          j         <= '0;
          phase     <= PH_PIVOT;
          start_piv <= 1'b1;
        end
        PH_PIVOT: if (piv_done) begin
          phase      <= PH_PUPD;
          start_pupd <= 1'b1;
        end
        PH_PUPD: if (pupd_done) begin
          phase     <= PH_UPDATE;
          start_upd <= 1'b1;
        end
        PH_UPDATE: if (upd_done) begin
          if (j == idx_t'(N - 1)) begin
            phase     <= PH_OUTPUT;
            start_out <= 1'b1;
          end else begin
            j         <= j + idx_t'(1);
            phase     <= PH_PIVOT;
            start_piv <= 1'b1;
          end
        end
        PH_OUTPUT: if (out_done) begin
          phase    <= PH_LOAD;
          lut_init <= 1'b1;
        end
        default: phase <= PH_LOAD;
      endcase
    end
  end

endmodule
