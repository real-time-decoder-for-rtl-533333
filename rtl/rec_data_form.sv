// rec_data_form: forms the decoded bit-stream, bit clock, EOF and error.
//
// Each bit slot lasts 2*HALF sub-carrier periods. The comparator output is
// sampled twice per slot, at the ticks where `phase` is HALF and 0: the
// window then covers exactly the first or the second half of the slot that
// has just gone by. The two samples classify the slot (rec_pkg::slot_e):
// pulses only in the first half is logic "0", only in the second half
// logic "1", in both halves the burst of an end of frame, in neither a
// coding error.
//
// After `start` (an accepted SOF burst) the first slot must be the SOF's
// closing logic "1"; if it is not, the frame is dropped silently (`stop`)
// and the SOF & timing block waits again. Data bits are then held back one
// slot, because the logic "0" that opens an EOF is not data: a bit is
// emitted on `data_out` only when the following slot is a data bit too.
// A slot with pulses in both halves that follows a held "0" is the end of
// frame: `eof` pulses for one cycle and the frame ends. Any other
// violation (no pulses in a slot, or the burst after a held "1") sets
// `error`, which stays high until the next SOF, and ends the frame.
//
// Timing: `data_out` changes at the tick that starts a slot; `bit_clk`
// rises BCLK_RISE periods later and falls HALF periods after that, so the
// bit clock is shifted against the data and its rising edge falls in the
// middle of the stable data. One bit_clk pulse per emitted bit.
//
// The outputs (data, bit clock shifted against the data, EOF, error) and
// their meaning follow the document. Sampling points, the one-slot hold,
// the bit clock phase and the frame drop on a bad SOF are this design's.
module rec_data_form #(
  parameter int unsigned HALF      = rec_pkg::HALF_PULSES,
  parameter int unsigned BCLK_RISE = 4,
  parameter int unsigned PW        = $clog2(2 * HALF)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tick,      // period strobe
  input  logic          start,     // SOF burst accepted
  input  logic [PW-1:0] phase,     // slot position of the period shifted now
  input  logic          comp,      // comparator output
  output logic          data_out,  // decoded data bit
  output logic          bit_clk,   // bit clock, one pulse per data bit
  output logic          eof,       // one-cycle strobe: end of frame decoded
  output logic          error,     // frame could not be decoded
  output logic          stop       // one-cycle strobe: frame over
);
  import rec_pkg::*;

  df_state_e state_q;
  logic      s0_q;        // comparator sample at the middle of the slot
  logic      pend_q;      // data bit held back one slot
  logic      have_pend_q;
  logic      bclk_arm_q;  // a bit was emitted, its bit clock pulse is due
  slot_e     slot;

  assign slot = slot_e'({s0_q, comp});

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q     <= DF_IDLE;
      s0_q        <= 1'b0;
      pend_q      <= 1'b0;
      have_pend_q <= 1'b0;
      bclk_arm_q  <= 1'b0;
      data_out    <= 1'b0;
      bit_clk     <= 1'b0;
      eof         <= 1'b0;
      error       <= 1'b0;
      stop        <= 1'b0;
    end else begin
      eof  <= 1'b0;
      stop <= 1'b0;
      if (start) begin
        state_q     <= DF_SOF1;
        error       <= 1'b0;
        have_pend_q <= 1'b0;
        bclk_arm_q  <= 1'b0;
        bit_clk     <= 1'b0;
      end else if (tick && state_q != DF_IDLE) begin
        // Bit clock of the bit emitted at the start of this slot.
        if (bclk_arm_q && 32'(phase) == BCLK_RISE) begin
          bit_clk <= 1'b1;
        end else if (bit_clk && 32'(phase) == BCLK_RISE + HALF) begin
          bit_clk    <= 1'b0;
          bclk_arm_q <= 1'b0;
        end

        if (32'(phase) == HALF) begin
          s0_q <= comp;
        end else if (phase == '0) begin
          unique case (state_q)
            DF_SOF1: begin
              if (slot == SLOT_ONE) begin
                state_q <= DF_DATA;
              end else begin
                state_q <= DF_IDLE;
                stop    <= 1'b1;
              end
            end
            DF_DATA: begin
              unique case (slot)
                SLOT_ZERO, SLOT_ONE: begin
                  if (have_pend_q) begin
                    data_out   <= pend_q;
                    bclk_arm_q <= 1'b1;
                  end
                  pend_q      <= (slot == SLOT_ONE);
                  have_pend_q <= 1'b1;
                end
                SLOT_BOTH: begin
                  state_q <= DF_IDLE;
                  stop    <= 1'b1;
                  bit_clk <= 1'b0;
                  if (have_pend_q && !pend_q) eof   <= 1'b1;
                  else                        error <= 1'b1;
                end
                default: begin  // SLOT_NONE
                  state_q <= DF_IDLE;
                  stop    <= 1'b1;
                  bit_clk <= 1'b0;
                  error   <= 1'b1;
                end
              endcase
            end
            default: state_q <= DF_IDLE;
          endcase
        end
      end
    end
  end

  // Every end of frame, and every new error, also ends the frame.
  assert property (@(posedge clk) disable iff (!rst_n) eof |-> stop && !error);
  assert property (@(posedge clk) disable iff (!rst_n) $rose(error) |-> stop);
  // A bit clock pulse only happens while a frame is decoded.
  assert property (@(posedge clk) disable iff (!rst_n) $rose(bit_clk) |-> state_q == DF_DATA);

endmodule
