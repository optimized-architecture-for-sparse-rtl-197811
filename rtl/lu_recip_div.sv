// lu_recip_div: sequential reciprocal of a Q8.8 pivot.
//
// Computes recip = sign(p) * floor(2^24 / |P|), where P is the raw 16-bit
// pivot word; recip is therefore 1/p with 16 fraction bits. A restoring
// divider produces one quotient bit per cycle, so a result takes 25 cycles
// after start plus one cycle to finish. A zero pivot gives recip = 0 on the
// cycle after start (its column has nothing to eliminate).
//
// Interface: start is a one-cycle pulse with the pivot on p; done pulses for
// one cycle with recip valid (recip holds until the next start).
// The divider and the reciprocal format are this design's own.
module lu_recip_div
  import lu_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  logic   start,
  input  q_t     p,
  output logic   done,
  output recip_t recip
);

  localparam int unsigned QBITS = FRAC_W + RECIP_FRAC_W + 1; // 25 bits of 2^24

  logic [DATA_W:0]  divisor;
  logic [DATA_W+1:0] rem;
  logic [QBITS-1:0] quo;
  logic [QBITS-1:0] dividend;
  logic [5:0]       bitn;
  logic             busy, neg;

  logic [DATA_W+1:0] rem_sh;
  assign rem_sh = {rem[DATA_W:0], dividend[QBITS-1]};

  always_ff @(posedge clk) begin
    if (reset) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      recip <= '0;
      rem   <= '0;
      quo   <= '0;
      dividend <= '0;
      divisor  <= '0;
      bitn  <= '0;
      neg   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        if (p == '0) begin
          recip <= '0;
          done  <= 1'b1;
          busy  <= 1'b0;
        end else begin
          divisor  <= mag_q(p);
          neg      <= p[DATA_W-1];
          dividend <= QBITS'(1) << (QBITS-1);
          rem      <= '0;
          quo      <= '0;
          bitn     <= 6'(QBITS);
          busy     <= 1'b1;
        end
      end else if (busy) begin
        if (bitn != 0) begin
          dividend <= dividend << 1;
          if (rem_sh >= {1'b0, divisor}) begin
            rem <= rem_sh - {1'b0, divisor};
            quo <= {quo[QBITS-2:0], 1'b1};
          end else begin
            rem <= rem_sh;
            quo <= {quo[QBITS-2:0], 1'b0};
          end
          bitn <= bitn - 6'd1;
        end else begin
          recip <= neg ? -recip_t'(quo) : recip_t'(quo);
          done  <= 1'b1;
          busy  <= 1'b0;
        end
      end
    end
  end

endmodule
