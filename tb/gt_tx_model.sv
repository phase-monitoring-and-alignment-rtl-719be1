// gt_tx_model: behavioural model of the transmitter side of a transceiver,
// for simulation only (not synthesizable).
//
// It reproduces what the aligner sees of the real part: the serializer
// parallel clock XCLK, at the reference clock's frequency, delayed from TxRef
// by a fixed path delay BASE_PS, plus a whole number of UI (off_ui, 0 to
// XCLK_UI-1) that is drawn anew on every TX reset, plus the phase
// interpolator's offset in steps of UI/PI_STEPS_PER_UI. The interpolator's
// code is a PI_W-bit field of the DRP register at PI_ADDR; each write moves
// XCLK by the signed circular difference between the new and the old code.
// DRP accesses are answered with rdy after DRP_LAT cycles; with drp_mute set
// the model never answers. Optional uniform jitter of +/-JIT_PS is added to
// every XCLK edge. TxRef must have period TIN_PS = UI_PS * XCLK_UI and
// jitter that does not accumulate, and TIN_PS must be a whole number of
// femtoseconds. tx_resetdone rises RESET_CYC TxRef cycles after tx_reset
// falls. Any other DRP address reads back its last written value.
module gt_tx_model
  import ui_aligner_pkg::*;
#(
  parameter real                   UI_PS           = 104.192,
  parameter int unsigned           XCLK_UI         = 40,
  parameter int unsigned           PI_STEPS_PER_UI = 64,
  parameter real                   BASE_PS         = 310.0,
  parameter real                   JIT_PS          = 0.0,
  parameter logic [DRP_ADDR_W-1:0] PI_ADDR         = 10'h09C,
  parameter int unsigned           PI_LSB          = 0,
  parameter int unsigned           PI_W            = 7,
  parameter int unsigned           DRP_LAT         = 3,
  parameter int unsigned           RESET_CYC       = 20
) (
  input  logic     clk_txref,
  input  logic     tx_reset,
  output logic     tx_resetdone,
  output logic     clk_xclk,
  input  logic     drp_clk,
  input  drp_req_t drp_req,
  output drp_rsp_t drp_rsp,
  input  logic     drp_mute
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int PERIOD_STEPS = XCLK_UI * PI_STEPS_PER_UI;
  localparam real STEP_PS     = UI_PS / real'(PI_STEPS_PER_UI);
  localparam real TIN_PS      = UI_PS * real'(XCLK_UI);

  int unsigned off_ui;    // UI offset drawn at the last reset
  int          pi_accum;  // PI steps applied since time zero
  logic [DRP_DATA_W-1:0] regs [logic [DRP_ADDR_W-1:0]];
  int unsigned n_writes;
  int unsigned n_up, n_down;  // PI writes that moved the code up / down

  initial begin
    off_ui       = 0;
    pi_accum     = 0;
    n_writes     = 0;
    n_up         = 0;
    n_down       = 0;
    clk_xclk     = 1'b0;
    tx_resetdone = 1'b0;
    drp_rsp      = '0;
    regs[PI_ADDR] = 16'h5A00 | DRP_DATA_W'(7'h25 << PI_LSB);
  end

  // Phase of XCLK after TxRef, in PI steps, within one XCLK period.
  function automatic int phase_steps();
    int s;
    s = (int'(off_ui) * int'(PI_STEPS_PER_UI) + pi_accum) % PERIOD_STEPS;
    if (s < 0) s += PERIOD_STEPS;
    return s;
  endfunction

  function automatic real phase_ps();
    real p;
    p = BASE_PS + real'(phase_steps()) * STEP_PS;
    while (p >= TIN_PS) p -= TIN_PS;
    return p;
  endfunction

  // Uniform jitter in [-JIT_PS, JIT_PS].
  function automatic real jitter();
    if (JIT_PS == 0.0) return 0.0;
    return JIT_PS * (real'($urandom_range(2000)) / 1000.0 - 1.0);
  endfunction

  // XCLK: a free-running clock of period TIN_PS started from the first TxRef
  // edge. A phase change moves the next edge by the change, taken as the
  // shortest way round the period, so XCLK never loses or gains an edge.
  // Edge times are kept in integer femtoseconds so that they do not drift.
  localparam longint TIN_FS = longint'(TIN_PS * 1000.0);

  function automatic longint now_fs();
    return longint'($realtime * 1000.0);
  endfunction

  initial begin
    longint cur, nxt, nd, delta, jt;
    @(posedge clk_txref);
    cur = longint'(phase_ps() * 1000.0);
    nxt = now_fs() + cur;
    forever begin
      jt = longint'(jitter() * 1000.0);
      #(real'(nxt + jt - now_fs()) / 1000.0) clk_xclk = 1'b1;
      #(TIN_PS / 2.0) clk_xclk = 1'b0;
      nd    = longint'(phase_ps() * 1000.0);
      delta = nd - cur;
      if (delta >  TIN_FS / 2) delta -= TIN_FS;
      if (delta <= -TIN_FS / 2) delta += TIN_FS;
      cur = nd;
      nxt = nxt + TIN_FS + delta;
    end
  end

  // TX reset: new random UI offset.
  always @(posedge tx_reset) begin
    tx_resetdone = 1'b0;
    off_ui       = $urandom_range(XCLK_UI - 1);
  end
  always @(negedge tx_reset) begin
    repeat (RESET_CYC) @(posedge clk_txref);
    if (!tx_reset) tx_resetdone = 1'b1;
  end

  // Inject a phase jump of whole UI without a reset (for monitoring tests).
  task automatic jump_ui(input int ui);
    off_ui = (off_ui + XCLK_UI + ui) % XCLK_UI;
  endtask

  // DRP slave.
  logic                  pend;
  int unsigned           lat;
  logic [DRP_DATA_W-1:0] rdata;
  initial begin pend = 1'b0; lat = 0; rdata = '0; end

  always @(posedge drp_clk) begin
    drp_rsp.rdy <= 1'b0;
    if (pend) begin
      if (lat <= 1) begin
        pend <= 1'b0;
        if (!drp_mute) begin
          drp_rsp.rdy  <= 1'b1;
          drp_rsp.dout <= rdata;
        end
      end else begin
        lat <= lat - 1;
      end
    end
    if (drp_req.en) begin
      if (pend) $error("gt_tx_model: DRP access while one is outstanding");
      pend <= 1'b1;
      lat  <= DRP_LAT;
      if (drp_req.we) begin
        if (drp_req.addr == PI_ADDR) begin
          automatic logic [PI_W-1:0] oldc = regs[PI_ADDR][PI_LSB +: PI_W];
          automatic logic [PI_W-1:0] newc = drp_req.di[PI_LSB +: PI_W];
          automatic logic [PI_W-1:0] dc   = newc - oldc;
          pi_accum = pi_accum + int'($signed(dc));
          n_writes++;
          if ($signed(dc) > 0) n_up++;
          else if ($signed(dc) < 0) n_down++;
        end
        regs[drp_req.addr] = drp_req.di;
        rdata <= '0;
      end else begin
        rdata <= regs.exists(drp_req.addr) ? regs[drp_req.addr]
                                           : DRP_DATA_W'(drp_req.addr) ^ 16'hA500;
      end
    end
  end

endmodule
