// ldpc_decoder: partially parallel layered min-sum LDPC decoder for a
// quasi-cyclic code, with a combined channel/intermediate RAM and memory
// bypassing between consecutive layers.
//
// Datapath (one block column of Z messages per cycle):
//   read side : order_rom -> bypass_unit (stall / bypass) -> R0 of
//               fourport_ram -> mux-array -> cyclic_shifter -> sub_array
//               (T = APP - E_old) -> T written back through W1 and fed to
//               Z siso_units
//   write side: queue of finished layers -> R1 of fourport_ram (T) ->
//               add_array (APP = T + E_new) -> inverse cyclic_shifter ->
//               post-add register -> W0 (unless bypassed)
// The read side of layer q+1 (and q+2) runs while the write side of layer q
// is still busy. A column still waiting for its update is "pending"; a read
// of a pending column stalls, except in the cycle in which the add-array is
// producing it: then the value is forwarded through the mux-array and the W0
// write and R0 read are both skipped (bypass). A read in the cycle in which
// the post-add register writes the column through W0 takes that value from
// the register instead of R0 (forward). The per-layer read and write orders
// from order_rom put the shared columns where this can happen.
//
// Pipeline timing: read issue (cycle t, R0 and message RAM read) -> rs1
// (t+1: mux, shift, subtract) -> rs2 (t+2: W1 write, SISO update). The
// last slot of a layer pushes the finished records into the layer queue at
// the end of t+2, and the first write slot of that layer can issue at t+3
// (R1 read) -> ws1 (t+4: add, inverse shift, hard decisions) -> post-add
// register (t+5: W0 write). A read issued in the cycle a column is in ws1 is
// bypassed; one issued in its W0 cycle is forwarded. Up to three layers are in flight (one reading, two queued or
// writing), which allows overlap over three consecutive layers.
//
// Interface: after reset the decoder accepts a frame as NB beats on
// in_valid/in_ready, beat c carrying the Z channel LLRs of block column c
// (LLR_W-bit two's complement, positive = bit 0). It then decodes until all
// parity checks hold or MAX_ITER iterations have run, and returns the hard
// decisions as NB beats on out_valid/out_ready (out_last on the final beat)
// with the iteration count and a converged flag. stat_* count, per frame,
// decoding cycles, idle read cycles, bypassed reads, forwarded reads, and
// R0/W0 accesses made while decoding.
//
// Follows the document: layered decoding with Z parallel SISO units, shifter,
// sub-array, add-array, message RAM, one four-port memory for channel and
// intermediate data, mux-array with a pipeline register after the add-array,
// order ROM, 5-bit LLRs, 6-bit soft outputs, 15 iterations, stop on satisfied
// parity checks. The layer decoding order is a parameter (ORDER), to be set
// from an offline search. This design's own choices: the code (ldpc_pkg),
// Z = 24, the default natural layer order, the
// offset min-sum correction, the dynamic pending/stall mechanism, the
// forward from the W0 cycle, the queue
// of finished layers, and the I/O handshake.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int Z        = Z_DEF,
  parameter int MAX_ITER = MAX_ITER_DEF,
  parameter int OFFSET   = OFFSET_DEF,
  parameter order_t ORDER = LAYER_ORDER   // layer decoding order
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // frame input
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic [Z-1:0][LLR_W-1:0]     in_llr,
  // decoded output
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic [Z-1:0]                out_hd,
  output logic [COL_W-1:0]            out_col,
  output logic                        out_last,
  output logic [4:0]                  out_iters,
  output logic                        out_converged,
  // per-frame statistics
  output logic [31:0]                 stat_cycles,
  output logic [31:0]                 stat_idle,
  output logic [31:0]                 stat_bypass,
  output logic [31:0]                 stat_forward,
  output logic [31:0]                 stat_r0_reads,
  output logic [31:0]                 stat_w0_writes
);
  localparam int SH_W  = $clog2(Z);
  localparam int ROW_W = Z * APP_W;
  localparam int MSG_W = Z * $bits(cn_msg_t);
  localparam int IT_W  = 5;
  localparam int QDEPTH = 3;

  typedef enum logic [1:0] {S_LOAD, S_DEC, S_OUT} state_t;

  typedef struct packed {
    logic [LAY_W-1:0]  lay;
    logic [IT_W-1:0]   iter;
    logic              syn_ok;
    cn_msg_t [Z-1:0]   msg;
  } job_t;

  state_t state;
  logic   flush;          // end of decoding: drop everything in flight

  // ------------------------------------------------------------------
  // schedule ROMs (read side and write side)
  // ------------------------------------------------------------------
  logic [LAY_W-1:0] r_lay, w_lay;
  logic [IDX_W-1:0] r_slot, w_slot;
  logic [IT_W-1:0]  r_iter;
  logic             r_run;
  logic [1:0]       inflight;

  logic [LAY_W-1:0] r_row, w_row;
  logic [IDX_W:0]   r_deg, w_deg;
  logic [COL_W-1:0] r_col, w_col, unused_col_a, unused_col_b;
  logic [SH_W-1:0]  r_sh, w_sh, unused_sh_a, unused_sh_b;
  logic [IDX_W-1:0] w_pos, unused_pos;

  order_rom #(.Z(Z), .ORDER(ORDER)) u_rom_rd (
    .layer(r_lay), .rslot(r_slot), .wslot('0),
    .row(r_row), .deg(r_deg), .rd_col(r_col), .rd_shift(r_sh),
    .wr_col(unused_col_a), .wr_shift(unused_sh_a), .wr_pos(unused_pos));

  order_rom #(.Z(Z), .ORDER(ORDER)) u_rom_wr (
    .layer(w_lay), .rslot('0), .wslot(w_slot),
    .row(w_row), .deg(w_deg), .rd_col(unused_col_b), .rd_shift(unused_sh_b),
    .wr_col(w_col), .wr_shift(w_sh), .wr_pos(w_pos));

  // ------------------------------------------------------------------
  // pipeline registers
  // ------------------------------------------------------------------
  typedef struct packed {
    logic             valid;
    logic [COL_W-1:0] col;
    logic [SH_W-1:0]  sh;
    logic [IDX_W-1:0] pos;
    logic             first;
    logic             last;
    logic [LAY_W-1:0] lay;
    logic [IT_W-1:0]  iter;
  } rs1_t;

  typedef struct packed {
    logic             valid;
    app_t [Z-1:0]     t;
    logic [Z-1:0]     sgn;      // hard decisions of the APP read (shifted)
    logic [COL_W-1:0] col;
    logic [IDX_W-1:0] pos;
    logic             first;
    logic             last;
    logic [LAY_W-1:0] lay;
    logic [IT_W-1:0]  iter;
  } rs2_t;

  typedef struct packed {
    logic             valid;
    logic [COL_W-1:0] col;
    logic [SH_W-1:0]  sh;
    logic [IDX_W-1:0] pos;
    logic             last;
    job_t             job;
  } ws1_t;

  typedef struct packed {
    logic             valid;
    logic             drop;     // value was bypassed: no W0 write
    logic [COL_W-1:0] col;
    app_t [Z-1:0]     app;
  } pa_t;

  rs1_t rs1;
  rs2_t rs2;
  ws1_t ws1;
  pa_t  pa;

  // ------------------------------------------------------------------
  // memories
  // ------------------------------------------------------------------
  logic             r0_en, w0_en, r1_en, w1_en;
  logic [COL_W-1:0] w0_addr;
  logic [ROW_W-1:0] r0_data, r1_data, w0_data;

  fourport_ram #(.DEPTH(NB), .WIDTH(ROW_W)) u_ram (
    .clk,
    .r0_en, .r0_addr(r_col), .r0_data,
    .w0_en, .w0_addr, .w0_data,
    .r1_en, .r1_addr(w_col), .r1_data,
    .w1_en, .w1_addr(rs2.col), .w1_data(rs2.t));

  logic             mr_ren, mr_wen;
  logic [MSG_W-1:0] mr_rdata;
  job_t             q_head;

  message_ram #(.DEPTH(MB), .WIDTH(MSG_W)) u_msg_ram (
    .clk,
    .ren(mr_ren), .raddr(r_row), .rdata(mr_rdata),
    .wen(mr_wen), .waddr(w_row), .wdata(q_head.msg));

  // ------------------------------------------------------------------
  // read side: issue, stall and bypass
  // ------------------------------------------------------------------
  logic rd_req, rd_stall, rd_fire, rd_bypass, rd_fwd;
  logic [ROW_W-1:0] mux_data;
  logic             r_last_slot;

  assign r_last_slot = ({1'b0, r_slot} == r_deg - 1'b1);
  assign rd_req = (state == S_DEC) && !flush && r_run &&
                  (r_slot != '0 || inflight < 2'd3);

  bypass_unit #(.NB(NB), .WIDTH(ROW_W)) u_bypass (
    .clk, .rst_n, .flush(flush || state != S_DEC),
    .rd_req, .rd_col(r_col), .rd_stall, .rd_fire, .rd_bypass, .rd_fwd,
    .ws_valid(ws1.valid), .ws_col(ws1.col),
    .w0_en(w0_en && state == S_DEC), .w0_col(pa.col),
    .ram_data(r0_data), .pa_data(pa.app), .mux_data);

  assign r0_en  = rd_fire && !rd_bypass && !rd_fwd;
  assign mr_ren = rd_fire && (r_slot == '0);

  // rs1: mux-array output -> shifter -> sub-array
  app_t    [Z-1:0] app_sh, t_new;
  cn_msg_t [Z-1:0] old_msg;
  logic    [Z-1:0] app_sgn;

  assign old_msg = mr_rdata;

  cyclic_shifter #(.Z(Z), .W(APP_W), .INVERSE(1'b0)) u_shift_rd (
    .din(mux_data), .shift(rs1.sh), .dout(app_sh));

  sub_array #(.Z(Z)) u_sub (
    .app(app_sh), .old_msg, .pos(rs1.pos), .first_iter(rs1.iter == '0),
    .t(t_new));

  always_comb for (int i = 0; i < Z; i++) app_sgn[i] = app_sh[i][APP_W-1];

  // rs2: W1 write and SISO units
  cn_msg_t [Z-1:0] siso_res;
  assign w1_en = rs2.valid;

  for (genvar i = 0; i < Z; i++) begin : g_siso
    siso_unit #(.OFFSET(OFFSET)) u_siso (
      .clk, .rst_n,
      .in_valid(rs2.valid), .in_first(rs2.first), .t(rs2.t[i]), .pos(rs2.pos),
      .result(siso_res[i]));
  end

  // ------------------------------------------------------------------
  // layer queue
  // ------------------------------------------------------------------
  logic q_push, q_pop, q_empty, q_full;
  logic syn_ok;
  job_t q_in;

  assign q_push     = rs2.valid && rs2.last;
  assign q_in.lay    = rs2.lay;
  assign q_in.iter   = rs2.iter;
  assign q_in.syn_ok = syn_ok;
  assign q_in.msg    = siso_res;

  sync_fifo #(.WIDTH($bits(job_t)), .DEPTH(QDEPTH)) u_queue (
    .clk, .rst_n, .flush(flush || state != S_DEC),
    .push(q_push), .din(q_in), .pop(q_pop), .dout(q_head),
    .empty(q_empty), .full(q_full));

  // ------------------------------------------------------------------
  // write side
  // ------------------------------------------------------------------
  logic w_issue, w_last_slot;
  assign w_lay       = q_head.lay;
  assign w_issue     = (state == S_DEC) && !flush && !q_empty;
  assign w_last_slot = ({1'b0, w_slot} == w_deg - 1'b1);
  assign q_pop       = w_issue && w_last_slot;
  assign r1_en       = w_issue;
  assign mr_wen      = w_issue && (w_slot == '0);

  app_t [Z-1:0] app_upd_sh, app_upd;
  logic [Z-1:0] upd_sgn;

  add_array #(.Z(Z)) u_add (
    .t(r1_data), .new_msg(ws1.job.msg), .pos(ws1.pos), .app(app_upd_sh));

  cyclic_shifter #(.Z(Z), .W(APP_W), .INVERSE(1'b1)) u_shift_wr (
    .din(app_upd_sh), .shift(ws1.sh), .dout(app_upd));

  always_comb for (int i = 0; i < Z; i++) upd_sgn[i] = app_upd[i][APP_W-1];

  // ------------------------------------------------------------------
  // hard decisions and termination
  // ------------------------------------------------------------------
  logic             ld_fire, stop, converged, upd_changed;
  logic [COL_W-1:0] ld_cnt, out_cnt;
  logic [Z-1:0]     ld_sgn, hd_rd;

  always_comb for (int i = 0; i < Z; i++) ld_sgn[i] = in_llr[i][LLR_W-1];

  hd_unit #(.NB(NB), .Z(Z)) u_hd (
    .clk, .rst_n, .start(ld_fire && ld_cnt == '0),
    .ld_en(ld_fire), .ld_col(ld_cnt), .ld_bits(ld_sgn),
    .upd_en(ws1.valid && !stop), .upd_col(ws1.col), .upd_bits(upd_sgn),
    .upd_changed,
    .syn_en(rs2.valid), .syn_first(rs2.first), .syn_bits(rs2.sgn), .syn_ok,
    .job_end(ws1.valid && ws1.last && !stop),
    .job_syn_ok(ws1.job.syn_ok),
    .job_iter_end(ws1.job.lay == LAY_W'(MB-1)),
    .job_last_iter(ws1.job.iter == IT_W'(MAX_ITER-1)),
    .stop, .converged,
    .rd_col(out_cnt), .rd_bits(hd_rd));

  assign flush = stop;

  // ------------------------------------------------------------------
  // W0 port: frame load or write-back from the post-add register
  // ------------------------------------------------------------------
  logic [ROW_W-1:0] ld_row;
  always_comb
    for (int i = 0; i < Z; i++)
      ld_row[i*APP_W +: APP_W] = APP_W'(signed'(in_llr[i]));

  assign in_ready = (state == S_LOAD);
  assign ld_fire  = in_valid && in_ready;
  assign w0_en    = ld_fire || (state == S_DEC && pa.valid && !pa.drop);
  assign w0_addr  = ld_fire ? ld_cnt : pa.col;
  assign w0_data  = ld_fire ? ld_row : pa.app;

  // ------------------------------------------------------------------
  // sequencing
  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_LOAD;
      ld_cnt   <= '0;
      out_cnt  <= '0;
      r_lay    <= '0;
      r_slot   <= '0;
      r_iter   <= '0;
      r_run    <= 1'b0;
      inflight <= '0;
      w_slot   <= '0;
      rs1      <= '0;
      rs2      <= '0;
      ws1      <= '0;
      pa       <= '0;
    end else begin
      // ---------------- pipeline advance ----------------
      rs1.valid <= rd_fire;
      if (rd_fire) begin
        rs1.col   <= r_col;
        rs1.sh    <= r_sh;
        rs1.pos   <= r_slot;
        rs1.first <= (r_slot == '0);
        rs1.last  <= r_last_slot;
        rs1.lay   <= r_lay;
        rs1.iter  <= r_iter;
      end
      rs2.valid <= rs1.valid;
      if (rs1.valid) begin
        rs2.t     <= t_new;
        rs2.sgn   <= app_sgn;
        rs2.col   <= rs1.col;
        rs2.pos   <= rs1.pos;
        rs2.first <= rs1.first;
        rs2.last  <= rs1.last;
        rs2.lay   <= rs1.lay;
        rs2.iter  <= rs1.iter;
      end
      ws1.valid <= w_issue;
      if (w_issue) begin
        ws1.col  <= w_col;
        ws1.sh   <= w_sh;
        ws1.pos  <= w_pos;
        ws1.last <= w_last_slot;
        ws1.job  <= q_head;
      end
      pa.valid <= ws1.valid;
      pa.drop  <= rd_bypass;
      if (ws1.valid) begin
        pa.col <= ws1.col;
        pa.app <= app_upd;
      end

      // ---------------- read sequencing ----------------
      if (rd_fire) begin
        if (r_last_slot) begin
          r_slot <= '0;
          if (r_lay == LAY_W'(MB-1)) begin
            r_lay  <= '0;
            r_iter <= r_iter + 1'b1;
            if (r_iter == IT_W'(MAX_ITER-1)) r_run <= 1'b0;
          end else begin
            r_lay <= r_lay + 1'b1;
          end
        end else begin
          r_slot <= r_slot + 1'b1;
        end
      end
      inflight <= inflight + 2'(rd_fire && r_slot == '0) - 2'(q_pop);

      // ---------------- write sequencing ----------------
      if (w_issue) w_slot <= w_last_slot ? '0 : w_slot + 1'b1;

      // ---------------- frame control ----------------
      unique case (state)
        S_LOAD: if (ld_fire) begin
          ld_cnt <= (ld_cnt == COL_W'(NB-1)) ? '0 : ld_cnt + 1'b1;
          if (ld_cnt == COL_W'(NB-1)) begin
            state  <= S_DEC;
            r_lay  <= '0;
            r_slot <= '0;
            r_iter <= '0;
            r_run  <= 1'b1;
            inflight <= '0;
            w_slot <= '0;
          end
        end
        S_DEC: if (stop) begin
          state    <= S_OUT;
          out_cnt  <= '0;
          r_run    <= 1'b0;
          inflight <= '0;
          w_slot   <= '0;
          rs1.valid <= 1'b0;
          rs2.valid <= 1'b0;
          ws1.valid <= 1'b0;
          pa.valid  <= 1'b0;
        end
        S_OUT: if (out_ready) begin
          out_cnt <= out_cnt + 1'b1;
          if (out_cnt == COL_W'(NB-1)) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // iteration number of the job that ended decoding, captured with stop
  logic [IT_W-1:0] end_iter;
  always_ff @(posedge clk) if (ws1.valid && ws1.last) end_iter <= ws1.job.iter;

  assign out_valid     = (state == S_OUT);
  assign out_hd        = hd_rd;
  assign out_col       = out_cnt;
  assign out_last      = (out_cnt == COL_W'(NB-1));
  assign out_iters     = end_iter + 1'b1;
  assign out_converged = converged;

  // ------------------------------------------------------------------
  // statistics
  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stat_cycles <= '0; stat_idle <= '0; stat_bypass <= '0; stat_forward <= '0;
      stat_r0_reads <= '0; stat_w0_writes <= '0;
    end else if (ld_fire && ld_cnt == '0) begin
      stat_cycles <= '0; stat_idle <= '0; stat_bypass <= '0; stat_forward <= '0;
      stat_r0_reads <= '0; stat_w0_writes <= '0;
    end else if (state == S_DEC) begin
      stat_cycles    <= stat_cycles + 1;
      stat_idle      <= stat_idle + 32'(r_run && !rd_fire);
      stat_bypass    <= stat_bypass + 32'(rd_bypass);
      stat_forward   <= stat_forward + 32'(rd_fwd);
      stat_r0_reads  <= stat_r0_reads + 32'(r0_en);
      stat_w0_writes <= stat_w0_writes + 32'(w0_en);
    end
  end

  // the W0 write-back and a W1 write never hit the same column together
  a_ports: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_DEC && w0_en && w1_en) |-> (w0_addr != rs2.col));
endmodule
