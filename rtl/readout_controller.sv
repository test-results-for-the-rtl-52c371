// readout_controller: the Readout Controller (ROC) of the Jet/Energy Module.
//
// On a Level-1 accept (sampled once per bunch crossing) the ROC records the
// bunch-crossing number and the pipeline index of the accepted crossing, which
// is the current write index minus the programmed latency, in an event FIFO.
// A copy engine then reads `n_slices` (1..5) consecutive slices centred on
// that crossing from all readout pipelines (read index first slice =
// accepted - (n-1)/2), one slice every two clocks, into a slice FIFO, and the
// RoI data of the accepted crossing into an RoI FIFO. Copying right away
// keeps readout independent of the pipeline depth. Two serialisers then
// drain the FIFOs as 16-bit words, one per 80 MHz clock, towards the G-Link
// transmitters:
//   DAQ:      {4'hA, BCN}, {13'b0, n}, then per slice SLICE_W/16 words
//             (InputFPGA 0..10, 5 words each, low bits first, then 5 words of
//             {pad, mult, Ey, Ex, Et}); `daq_last` on the final word.
//   Level-2:  {4'hB, BCN}, one word {3'b0, position, hits} per core 2x2
//             position that passed any threshold, {4'hE, 6'b0, count};
//             position = phi_row * 4 + eta_column in the core.
// A spy memory captures the DAQ stream after a playback/spy command.
// Accepts that find the event FIFO full are dropped and counted.
//
// Collecting up to five slices with the bunch-crossing number on L1Accept,
// sending the RoIs to Level-2 and the ROC spy memory follow the module
// description; packet formats, FIFO sizes and slice centring are this
// design's choices.
module readout_controller
  import jem_pkg::*;
#(
  parameter int EV_DEPTH    = 8,
  parameter int SLICE_DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     bc_ph,
  input  logic                     l1a,
  input  logic [BCN_W-1:0]         bcn,
  input  logic [PIPE_AW-1:0]       l1a_latency,
  input  logic [2:0]               n_slices,
  // pipeline read port
  output logic [PIPE_AW-1:0]       rd_idx,
  input  logic [SLICE_W-1:0]       slice_in,
  input  logic [ROI_W-1:0]         roi_in,
  // G-Link word streams
  output logic [15:0]              daq_data,
  output logic                     daq_valid,
  output logic                     daq_first,
  output logic                     daq_last,
  output logic [15:0]              roi_data,
  output logic                     roi_valid,
  output logic                     roi_first,
  output logic                     roi_last,
  // spy memory and status
  input  logic                     spy_start,
  input  logic [7:0]               spy_rd_addr,
  output logic [17:0]              spy_rd_data,
  output logic [7:0]               dropped
);

  localparam int SW  = SLICE_W / 16;      // words per slice
  localparam int EVW = PIPE_AW + BCN_W + 3;

  // ---------------- event FIFO ----------------
  logic [PIPE_AW-1:0] bc_idx;
  logic               ev_push, ev_pop, ev_empty, ev_full;
  logic [EVW-1:0]     ev_din, ev_dout;
  logic [$clog2(EV_DEPTH):0] ev_count_unused;
  logic [2:0]         nsl;

  assign nsl = (n_slices == 0) ? 3'd1 : (n_slices > 3'(MAX_SLICES)) ? 3'(MAX_SLICES) : n_slices;

  always_ff @(posedge clk) begin
    if (rst) begin
      bc_idx  <= '0;
      dropped <= '0;
    end else if (bc_ph) begin
      bc_idx <= bc_idx + 1'b1;
      if (l1a && ev_full && dropped != 8'hFF) dropped <= dropped + 1'b1;
    end
  end

  assign ev_push = bc_ph && l1a && !ev_full;
  assign ev_din  = {nsl, bcn, PIPE_AW'(bc_idx - l1a_latency)};

  sync_fifo #(.W(EVW), .DEPTH(EV_DEPTH)) u_ev (
    .clk, .rst, .push(ev_push), .din(ev_din), .pop(ev_pop), .dout(ev_dout),
    .empty(ev_empty), .full(ev_full), .count(ev_count_unused)
  );

  // ---------------- copy engine ----------------
  typedef enum logic [1:0] {C_IDLE, C_ISSUE, C_SLICE, C_ROI} copy_t;
  copy_t               cst;
  logic [2:0]          cs, cn;
  logic [PIPE_AW-1:0]  cbase;
  logic [BCN_W-1:0]    cbcn;

  // header FIFO (per event: bcn, n) and data FIFOs
  logic hd_push, hd_pop, hd_empty, hd_full;
  logic [BCN_W+2:0] hd_dout;
  logic sl_push, sl_pop, sl_empty, sl_full;
  logic [SLICE_W-1:0] sl_dout;
  logic [$clog2(SLICE_DEPTH):0] sl_count;
  logic rf_push, rf_pop, rf_empty, rf_full;
  logic [BCN_W+ROI_W-1:0] rf_dout;
  logic [$clog2(EV_DEPTH):0] hd_count_unused, rf_count_unused;

  logic room;
  assign room = !hd_full && !rf_full &&
                (int'(sl_count) + MAX_SLICES <= SLICE_DEPTH);

  assign ev_pop  = (cst == C_IDLE) && !ev_empty && room;
  assign hd_push = ev_pop;
  assign sl_push = (cst == C_SLICE);
  assign rf_push = (cst == C_ROI);

  always_ff @(posedge clk) begin
    if (rst) begin
      cst   <= C_IDLE;
      cs    <= '0;
      cn    <= '0;
      cbase <= '0;
      cbcn  <= '0;
    end else begin
      case (cst)
        C_IDLE: if (ev_pop) begin
          cn    <= ev_dout[EVW-1 -: 3];
          cbcn  <= ev_dout[PIPE_AW +: BCN_W];
          cbase <= ev_dout[PIPE_AW-1:0];
          cs    <= '0;
          cst   <= C_ISSUE;
        end
        C_ISSUE: cst <= (cs == cn) ? C_ROI : C_SLICE;
        C_SLICE: begin
          cs  <= cs + 1'b1;
          cst <= C_ISSUE;
        end
        default: cst <= C_IDLE;   // C_ROI
      endcase
    end
  end

  // read index: slice cs of the window, or the accepted crossing for RoIs
  always_comb begin
    if (cs == cn) rd_idx = cbase;
    else          rd_idx = cbase - PIPE_AW'(3'(cn - 3'd1) >> 1) + PIPE_AW'(cs);
  end

  sync_fifo #(.W(BCN_W + 3), .DEPTH(EV_DEPTH)) u_hd (
    .clk, .rst, .push(hd_push), .din({ev_dout[EVW-1 -: 3], ev_dout[PIPE_AW +: BCN_W]}),
    .pop(hd_pop), .dout(hd_dout), .empty(hd_empty), .full(hd_full), .count(hd_count_unused)
  );
  sync_fifo #(.W(SLICE_W), .DEPTH(SLICE_DEPTH)) u_sl (
    .clk, .rst, .push(sl_push), .din(slice_in), .pop(sl_pop), .dout(sl_dout),
    .empty(sl_empty), .full(sl_full), .count(sl_count)
  );
  sync_fifo #(.W(BCN_W + ROI_W), .DEPTH(EV_DEPTH)) u_rf (
    .clk, .rst, .push(rf_push), .din({cbcn, roi_in}), .pop(rf_pop), .dout(rf_dout),
    .empty(rf_empty), .full(rf_full), .count(rf_count_unused)
  );

  // ---------------- DAQ serialiser ----------------
  typedef enum logic [1:0] {D_IDLE, D_HDR, D_N, D_DATA} daq_t;
  daq_t       dst;
  logic [2:0] d_slice, d_n;
  logic [$clog2(SW)-1:0] d_word;
  logic [BCN_W-1:0] d_bcn;

  assign hd_pop = (dst == D_IDLE) && !hd_empty;
  assign sl_pop = (dst == D_DATA) && !sl_empty && (d_word == ($clog2(SW))'(SW - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      dst       <= D_IDLE;
      d_slice   <= '0;
      d_n       <= '0;
      d_word    <= '0;
      d_bcn     <= '0;
      daq_valid <= 1'b0;
      daq_first <= 1'b0;
      daq_last  <= 1'b0;
      daq_data  <= '0;
    end else begin
      daq_valid <= 1'b0;
      daq_first <= 1'b0;
      daq_last  <= 1'b0;
      case (dst)
        D_IDLE: if (hd_pop) begin
          d_n   <= hd_dout[BCN_W +: 3];
          d_bcn <= hd_dout[BCN_W-1:0];
          dst   <= D_HDR;
        end
        D_HDR: begin
          daq_data  <= {4'hA, d_bcn};
          daq_valid <= 1'b1;
          daq_first <= 1'b1;
          dst       <= D_N;
        end
        D_N: begin
          daq_data  <= {13'd0, d_n};
          daq_valid <= 1'b1;
          d_slice   <= '0;
          d_word    <= '0;
          dst       <= D_DATA;
        end
        default: if (!sl_empty) begin   // D_DATA
          daq_data  <= sl_dout[d_word*16 +: 16];
          daq_valid <= 1'b1;
          if (d_word == ($clog2(SW))'(SW - 1)) begin
            d_word  <= '0;
            d_slice <= d_slice + 1'b1;
            if (d_slice == d_n - 3'd1) begin
              daq_last <= 1'b1;
              dst      <= D_IDLE;
            end
          end else begin
            d_word <= d_word + 1'b1;
          end
        end
      endcase
    end
  end

  // ---------------- Level-2 RoI serialiser ----------------
  typedef enum logic [1:0] {R_IDLE, R_HDR, R_SCAN, R_TRL} roi_st_t;
  roi_st_t    rst_q;
  logic [4:0] r_pos;
  logic [5:0] r_cnt;
  logic [N_THR:0] r_entry;

  assign rf_pop  = (rst_q == R_TRL);
  assign r_entry = rf_dout[r_pos*(N_THR+1) +: N_THR+1];

  always_ff @(posedge clk) begin
    if (rst) begin
      rst_q     <= R_IDLE;
      r_pos     <= '0;
      r_cnt     <= '0;
      roi_valid <= 1'b0;
      roi_first <= 1'b0;
      roi_last  <= 1'b0;
      roi_data  <= '0;
    end else begin
      roi_valid <= 1'b0;
      roi_first <= 1'b0;
      roi_last  <= 1'b0;
      case (rst_q)
        R_IDLE: if (!rf_empty) rst_q <= R_HDR;
        R_HDR: begin
          roi_data  <= {4'hB, rf_dout[ROI_W +: BCN_W]};
          roi_valid <= 1'b1;
          roi_first <= 1'b1;
          r_pos     <= '0;
          r_cnt     <= '0;
          rst_q     <= R_SCAN;
        end
        R_SCAN: begin
          if (r_entry[N_THR-1:0] != '0) begin
            roi_data  <= {3'd0, r_pos, r_entry[N_THR-1:0]};
            roi_valid <= 1'b1;
            r_cnt     <= r_cnt + 1'b1;
          end
          r_pos <= r_pos + 1'b1;
          if (r_pos == 5'(N_ROI - 1)) rst_q <= R_TRL;
        end
        default: begin   // R_TRL
          roi_data  <= {4'hE, 6'd0, r_cnt};
          roi_valid <= 1'b1;
          roi_last  <= 1'b1;
          rst_q     <= R_IDLE;
        end
      endcase
    end
  end

  // ---------------- ROC spy memory ----------------
  logic spy_busy_unused, spy_full_unused;
  spy_memory #(.W(18), .DEPTH(256), .PER_BC(1'b0)) u_spy (
    .clk, .rst, .bc_ph, .we(daq_valid), .start(spy_start),
    .din({daq_first, daq_last, daq_data}),
    .busy(spy_busy_unused), .full(spy_full_unused),
    .rd_addr(spy_rd_addr), .rd_data(spy_rd_data)
  );

endmodule
