// control_fpga: VME register interface and TTC decoding of the JEM.
//
// VME side (reduced VMEbus, 16-bit word address, 16-bit data): a write strobe
// `vme_we` updates a configuration register, or writes one playback-memory
// word (address bit 15 set: InputFPGA in bits 14:11, channel 10:8, word 7:0).
// A read strobe `vme_re` returns `vme_rdata` with `vme_rvalid` two clocks
// later: a register, the status word, a 16-bit part (bits 9:8) of a
// MainProcessor spy word (0x4000 region) or of a ROC spy word (0x5000
// region). Writing bit 2 of the control register starts a playback/spy cycle;
// writing bit 3 clears the sticky parity-error flag of the status word
// ({dropped accepts, 0000, spy busy, parity error seen, playback active,
// all channels locked}).
//
// TTC side: the bunch-crossing number counts crossings, is cleared by the
// bunch-counter reset `ttc_bcr` and wraps after 3564 crossings; a broadcast
// command equal to BRC_PBSPY also starts a playback/spy cycle. `pbspy_start`
// is a one-clock pulse.
//
// VME access to configuration and diagnostic memories and playback/spy cycles
// started by a VME signal or a TTC broadcast follow the module description;
// the address map, command code and read timing are this design's choices.
module control_fpga
  import jem_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 bc_ph,
  // VME
  input  logic [15:0]          vme_addr,
  input  logic [15:0]          vme_wdata,
  input  logic                 vme_we,
  input  logic                 vme_re,
  output logic [15:0]          vme_rdata,
  output logic                 vme_rvalid,
  // TTC (TTCrx outputs)
  input  logic                 ttc_bcr,
  input  logic [5:0]           ttc_brc,
  input  logic                 ttc_brc_str,
  // to the module
  output jem_cfg_t             cfg,
  output logic [BCN_W-1:0]     bcn,
  output logic                 pbspy_start,
  output logic                 pb_wr_en [N_INFPGA],
  output logic [2:0]           pb_wr_ch,
  output logic [7:0]           pb_wr_addr,
  output logic [LVDS_W-1:0]    pb_wr_data,
  output logic [7:0]           spy_rd_addr,
  input  logic [63:0]          main_spy_data,
  input  logic [17:0]          roc_spy_data,
  input  logic                 all_locked,
  input  logic                 pb_active,
  input  logic                 parity_err,
  input  logic                 spy_busy,
  input  logic [7:0]           roc_dropped
);

  // ---------------- configuration registers ----------------
  logic perr_seen;   // sticky: a parity error occurred on some channel

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg             <= '0;
      cfg.l1a_latency <= PIPE_AW'(32);
      cfg.n_slices    <= 3'd1;
      cfg.thr         <= '1;
      pbspy_start     <= 1'b0;
      perr_seen       <= 1'b0;
    end else begin
      pbspy_start <= ttc_brc_str && (ttc_brc == BRC_PBSPY);
      if (bc_ph && parity_err) perr_seen <= 1'b1;
      if (vme_we && !vme_addr[15]) begin
        casez (vme_addr)
          A_CTRL: begin
            cfg.calib    <= vme_wdata[0];
            cfg.loopback <= vme_wdata[1];
            if (vme_wdata[2]) pbspy_start <= 1'b1;
            if (vme_wdata[3]) perr_seen   <= 1'b0;
          end
          A_LATENCY:  cfg.l1a_latency <= vme_wdata[PIPE_AW-1:0];
          A_NSLICES:  cfg.n_slices    <= vme_wdata[2:0];
          A_QUADRANT: cfg.quadrant    <= vme_wdata[1:0];
          A_WIN:      cfg.win         <= vme_wdata;
          16'b0000_0000_0001_0???: cfg.thr[vme_addr[2:0]] <= vme_wdata[JS_W-1:0];
          16'h002?: if (vme_addr[3:0] < 4'(N_INFPGA)) cfg.mask[vme_addr[3:0]] <= vme_wdata[N_CH-1:0];
          default: ;
        endcase
      end
    end
  end

  // ---------------- playback memory writes ----------------
  always_comb begin
    for (int f = 0; f < N_INFPGA; f++)
      pb_wr_en[f] = vme_we && vme_addr[15] && (vme_addr[14:11] == 4'(f));
  end
  assign pb_wr_ch   = vme_addr[10:8];
  assign pb_wr_addr = vme_addr[7:0];
  assign pb_wr_data = vme_wdata[LVDS_W-1:0];
  assign spy_rd_addr = vme_addr[7:0];

  // ---------------- reads ----------------
  logic        re_q;
  logic [15:0] addr_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      re_q       <= 1'b0;
      addr_q     <= '0;
      vme_rvalid <= 1'b0;
      vme_rdata  <= '0;
    end else begin
      re_q       <= vme_re;
      addr_q     <= vme_addr;
      vme_rvalid <= re_q;
      if (re_q) begin
        case (addr_q[15:12])
          4'h4: vme_rdata <= main_spy_data[addr_q[9:8]*16 +: 16];
          4'h5: vme_rdata <= addr_q[8] ? 16'(roc_spy_data[17:16]) : roc_spy_data[15:0];
          default:
            casez (addr_q)
              A_CTRL:     vme_rdata <= {14'd0, cfg.loopback, cfg.calib};
              A_STATUS:   vme_rdata <= {roc_dropped, 4'd0, spy_busy, perr_seen, pb_active, all_locked};
              A_LATENCY:  vme_rdata <= 16'(cfg.l1a_latency);
              A_NSLICES:  vme_rdata <= 16'(cfg.n_slices);
              A_QUADRANT: vme_rdata <= 16'(cfg.quadrant);
              A_WIN:      vme_rdata <= cfg.win;
              16'b0000_0000_0001_0???: vme_rdata <= 16'(cfg.thr[addr_q[2:0]]);
              16'h002?:   vme_rdata <= (addr_q[3:0] < 4'(N_INFPGA)) ? 16'(cfg.mask[addr_q[3:0]]) : '0;
              default:    vme_rdata <= 16'hDEAD;
            endcase
        endcase
      end
    end
  end

  // ---------------- bunch-crossing number ----------------
  always_ff @(posedge clk) begin
    if (rst) bcn <= '0;
    else if (bc_ph) begin
      if (ttc_bcr) bcn <= '0;
      else if (bcn == BCN_W'(ORBIT_BC - 1)) bcn <= '0;
      else bcn <= bcn + 1'b1;
    end
  end

endmodule
