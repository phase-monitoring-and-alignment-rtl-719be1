// rx_comma_aligner: word alignment of a receiver's parallel data on commas.
//
// A serial link deserialised into W-bit words starts with an unknown bit
// offset. The transmitter sends a comma (a 10-bit 8b10b header) at a fixed
// position of every frame; this state machine shifts the parallel data one bit
// at a time until the comma appears at bit COMMA_POS of the output word.
// A barrel shifter takes W bits at offset slip from the last two input words
// (earliest bit at bit 0). In SEARCH, each offset is tried for FRAME_WORDS
// words; if no comma was seen the offset slips by one bit. Once found the
// aligner is LOCKED and keeps checking one word per frame; LOSS_THR missing
// commas in a row return it to SEARCH.
//
// Interface: data_in and data_out are W-bit words on clk; data_out is
// data_in realigned, two cycles later. aligned is high while LOCKED; slip is
// the current bit offset (0 to W-1); slips counts bit slips.
// The bit-by-bit shifting on a comma follows the receiver alignment the
// timing link relies on; the comma value (K28.5, either running disparity),
// the frame length, the loss threshold and the bit order are choices of this
// design. W = 40 matches 9.6 Gb/s data on a 240 MHz word clock.
module rx_comma_aligner #(
  parameter int unsigned W           = 40,
  parameter int unsigned COMMA_W     = 10,
  parameter logic [9:0]  COMMA       = 10'b0101111100,  // K28.5, RD-, bit 0 first
  parameter bit          BOTH_RD     = 1'b1,            // also accept ~COMMA
  parameter int unsigned COMMA_POS   = 0,
  parameter int unsigned FRAME_WORDS = 1,
  parameter int unsigned LOSS_THR    = 4,
  parameter int unsigned STAT_W      = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [W-1:0]         data_in,
  output logic [W-1:0]         data_out,
  output logic                 aligned,
  output logic [$clog2(W)-1:0] slip,
  output logic [STAT_W-1:0]    slips
);

  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic {CA_SEARCH = 1'b0, CA_LOCKED = 1'b1} ca_state_t;

  localparam int unsigned SLIP_W  = $clog2(W);
  localparam int unsigned FRM_W   = $clog2(FRAME_WORDS + 1);
  localparam int unsigned LOSS_W  = $clog2(LOSS_THR + 1);

  ca_state_t         state;
  logic [W-1:0]      prev;
  logic [2*W-1:0]    pair;
  logic [W-1:0]      win;
  logic [COMMA_W-1:0] field;
  logic              hit;
  logic [FRM_W-1:0]  fcnt;
  logic              seen;
  logic [LOSS_W-1:0] misses;

  assign pair  = {data_in, prev};
  assign win   = pair[{1'b0, slip} +: W];
  assign field = win[COMMA_POS +: COMMA_W];
  assign hit   = (field == COMMA[COMMA_W-1:0]) ||
                 (BOTH_RD && (field == ~COMMA[COMMA_W-1:0]));
  assign aligned = (state == CA_LOCKED);

  always_ff @(posedge clk) begin
    if (rst) begin
      prev     <= '0;
      data_out <= '0;
      state    <= CA_SEARCH;
      slip     <= '0;
      slips    <= '0;
      fcnt     <= '0;
      seen     <= 1'b0;
      misses   <= '0;
    end else begin
      prev     <= data_in;
      data_out <= win;
      unique case (state)
        CA_SEARCH: begin
          if (hit) begin
            state  <= CA_LOCKED;
            fcnt   <= FRM_W'(1);
            seen   <= 1'b0;
            misses <= '0;
          end else if (fcnt == FRM_W'(FRAME_WORDS - 1)) begin
            // no comma at this offset for a whole frame: slip one bit
            slip  <= (slip == SLIP_W'(W - 1)) ? '0 : slip + 1'b1;
            slips <= slips + 1'b1;
            fcnt  <= '0;
          end else begin
            fcnt <= fcnt + 1'b1;
          end
        end
        CA_LOCKED: begin
          // one comma expected per frame of FRAME_WORDS words
          if (fcnt == FRM_W'(FRAME_WORDS - 1)) begin
            fcnt <= '0;
            seen <= 1'b0;
            if (hit || seen) begin
              misses <= '0;
            end else if (misses == LOSS_W'(LOSS_THR - 1)) begin
              state  <= CA_SEARCH;
              misses <= '0;
            end else begin
              misses <= misses + 1'b1;
            end
          end else begin
            fcnt <= fcnt + 1'b1;
            if (hit) seen <= 1'b1;
          end
        end
        default: state <= CA_SEARCH;
      endcase
    end
  end

endmodule
