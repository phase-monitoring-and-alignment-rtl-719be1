// drp_controller: moves the transceiver TX phase interpolator (TxPI) one step
// at a time through the DRP.
//
// Each step request is carried out as a read-modify-write of the DRP register
// that holds the PI code: the register at PI_ADDR is read, the PI_W-bit field
// at bit PI_LSB is incremented or decremented by STEP (modulo 2**PI_W, as the
// interpolator is circular) with the other bits kept, and the word is written
// back. step_done pulses when the write is acknowledged; pi_code then holds
// the new field value. If the transceiver does not answer within TIMEOUT
// cycles the access is abandoned, error is set (sticky until reset) and
// step_done still pulses so that the requester does not hang.
//
// DRP protocol: en is a one-cycle strobe with we, addr and di; the transceiver
// answers with a one-cycle rdy (and dout for a read). Only one access is
// outstanding. A step costs two DRP accesses, at least 4 cycles plus twice the
// transceiver's DRP latency. The register address, field position and width
// are placeholders of this design and must be set from the DRP map of the
// transceiver in use; that the PI is driven by DRP, with 64 codes per UI,
// follows the proposed architecture. The DRP clock is the clk input.
module drp_controller
  import ui_aligner_pkg::*;
#(
  parameter logic [DRP_ADDR_W-1:0] PI_ADDR = 10'h09C,
  parameter int unsigned           PI_LSB  = 0,
  parameter int unsigned           PI_W    = 7,
  parameter int unsigned           STEP    = 1,
  parameter int unsigned           TIMEOUT = 1024
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            step_req,
  input  pi_dir_t         step_dir,
  output logic            step_done,
  output logic            busy,
  output logic [PI_W-1:0] pi_code,
  output logic            error,
  output drp_req_t        drp_req,
  input  drp_rsp_t        drp_rsp
);

  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic [2:0] {
    DC_IDLE    = 3'd0,
    DC_READ    = 3'd1,
    DC_RD_WAIT = 3'd2,
    DC_WRITE   = 3'd3,
    DC_WR_WAIT = 3'd4
  } dc_state_t;

  localparam int unsigned TO_W = $clog2(TIMEOUT + 1);

  dc_state_t             state;
  pi_dir_t               dir;
  logic [DRP_DATA_W-1:0] word;
  logic [PI_W-1:0]       field_new;
  logic [TO_W-1:0]       wait_cnt;

  // New PI field: old field +/- STEP, wrapping.
  always_comb begin
    field_new = (dir == PI_UP) ? word[PI_LSB +: PI_W] + PI_W'(STEP)
                               : word[PI_LSB +: PI_W] - PI_W'(STEP);
  end

  assign busy = (state != DC_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= DC_IDLE;
      dir       <= PI_UP;
      word      <= '0;
      wait_cnt  <= '0;
      step_done <= 1'b0;
      pi_code   <= '0;
      error     <= 1'b0;
      drp_req   <= '0;
    end else begin
      step_done  <= 1'b0;
      drp_req.en <= 1'b0;
      drp_req.we <= 1'b0;
      unique case (state)
        DC_IDLE: if (step_req) begin
          dir   <= step_dir;
          state <= DC_READ;
        end
        DC_READ: begin
          drp_req.en   <= 1'b1;
          drp_req.we   <= 1'b0;
          drp_req.addr <= PI_ADDR;
          wait_cnt     <= '0;
          state        <= DC_RD_WAIT;
        end
        DC_RD_WAIT: begin
          if (drp_rsp.rdy) begin
            word  <= drp_rsp.dout;
            state <= DC_WRITE;
          end else if (wait_cnt == TO_W'(TIMEOUT)) begin
            error     <= 1'b1;
            step_done <= 1'b1;
            state     <= DC_IDLE;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        DC_WRITE: begin
          drp_req.en   <= 1'b1;
          drp_req.we   <= 1'b1;
          drp_req.addr <= PI_ADDR;
          drp_req.di   <= word;
          drp_req.di[PI_LSB +: PI_W] <= field_new;
          word[PI_LSB +: PI_W]       <= field_new;
          wait_cnt     <= '0;
          state        <= DC_WR_WAIT;
        end
        DC_WR_WAIT: begin
          if (drp_rsp.rdy) begin
            pi_code   <= word[PI_LSB +: PI_W];
            step_done <= 1'b1;
            state     <= DC_IDLE;
          end else if (wait_cnt == TO_W'(TIMEOUT)) begin
            error     <= 1'b1;
            step_done <= 1'b1;
            state     <= DC_IDLE;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        default: state <= DC_IDLE;
      endcase
    end
  end

  // DRP rules: a strobe lasts one cycle and is only issued with no access
  // outstanding.
  a_en_one_cycle: assert property (@(posedge clk) disable iff (rst)
    drp_req.en |=> !drp_req.en);
  a_en_when_idle: assert property (@(posedge clk) disable iff (rst)
    drp_req.en |-> (state == DC_RD_WAIT || state == DC_WR_WAIT));

endmodule
