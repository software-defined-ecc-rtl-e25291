// sdecc_mc: DDRx memory controller with Software-Defined ECC (SDECC) support.
//
// Main idea: a DUE (detected-but-uncorrectable error) on a demand read does
// not crash the system. The raw codewords of the afflicted cacheline are kept
// in the Penalty Box, SERVICE_REQ is set and an NMI goes to the OS. Software
// works out the few codewords the DUE can have come from, picks one (helped by
// an 8-bit cacheline hash stored with the line and by the entropy of the rest
// of the line), writes it back to the Penalty Box and releases the read. Other
// reads complete meanwhile, out of order. Reads without a DUE never touch the
// SDECC logic, so it costs no latency.
//
// Datapath (one 64-byte cacheline = 8 beats of a [72,64,4] SECDED codeword
// plus one hash bit, 73 bits per beat):
//   req -> request queue -> scheduler -> transaction queue -> linear-to-
//   physical translation -> command queue -> DRAM command port
//   write data: scheduler -> ECC encoder + hash -> write queue -> DRAM port
//   read data: DRAM beats -> read buffer -> ECC decoder / read path ->
//   data buffer -> rsp;  DUE: read path -> retry, or Penalty Box + status
//   registers -> NMI; software release -> data buffer -> rsp
// The DDR PHY is outside this module: dram_cmd_* issues one command per
// cacheline (writes carry all 8 beats in dram_wdata) and read data returns as
// beats on dram_rd_*, in command order, one beat per cycle. The controller
// never has more reads outstanding than the read buffer can hold
// (RD_LINES lines), so dram_rd has no backpressure.
//
// Memory-interface side: req_* takes reads (we=0, prefetch marks prefetches)
// and writes (we=1, data in req.wdata); writes get no response. rsp_* returns
// every read with a status (OK, CORRECTED, RECOVERED, DROPPED, POISON).
// Configuration side: cfg_* reaches the error status registers and the
// Penalty Box (register map in sdecc_csr); nmi pulses when a DUE is captured.
//
// Queue depths are this design's choices; the structure follows the
// controller block diagram of the SDECC architecture.
module sdecc_mc
  import sdecc_pkg::*;
#(
  parameter int REQ_DEPTH = 8,
  parameter int TXN_DEPTH = 8,
  parameter int CMD_DEPTH = 4,
  parameter int WQ_DEPTH  = 4,
  parameter int RD_LINES  = 4,
  parameter int RSP_DEPTH = 4,
  parameter bit RETRY_EN  = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  // memory interface (on-chip network side)
  input  logic        req_valid,
  output logic        req_ready,
  input  mem_req_t    req,
  output logic        rsp_valid,
  input  logic        rsp_ready,
  output mem_rsp_t    rsp,
  // DRAM side (to the DDR PHY)
  output logic        dram_cmd_valid,
  input  logic        dram_cmd_ready,
  output logic        dram_cmd_we,
  output phys_addr_t  dram_cmd_pa,
  output wline_t      dram_wdata,
  input  logic        dram_rd_valid,
  input  beat_t       dram_rd_beat,
  // device configuration interface
  input  logic        cfg_valid,
  input  logic        cfg_we,
  input  logic [7:0]  cfg_addr,
  input  logic [63:0] cfg_wdata,
  output logic        cfg_rvalid,
  output logic [63:0] cfg_rdata,
  // error reporting
  output logic        nmi,
  output logic        service_req
);

  // request queue
  logic     rq_valid, rq_ready;
  mem_req_t rq_head;
  sync_fifo #(.T(mem_req_t), .DEPTH(REQ_DEPTH)) u_req_q (
    .clk, .rst_n, .in_valid(req_valid), .in_ready(req_ready), .in_data(req),
    .out_valid(rq_valid), .out_ready(rq_ready), .out_data(rq_head), .count()
  );

  // scheduler
  logic  retry_valid, retry_ready;
  txn_t  retry_txn;
  logic  s_txn_valid, s_txn_ready, s_wr_valid, s_wr_ready;
  txn_t  s_txn;
  line_t s_wr_line;
  mc_scheduler u_sched (
    .retry_valid, .retry_ready, .retry_txn,
    .req_valid(rq_valid), .req_ready(rq_ready), .req(rq_head),
    .txn_valid(s_txn_valid), .txn_ready(s_txn_ready), .txn(s_txn),
    .wr_valid(s_wr_valid), .wr_ready(s_wr_ready), .wr_line(s_wr_line)
  );

  // transaction queue
  logic tq_valid, tq_ready;
  txn_t tq_head;
  sync_fifo #(.T(txn_t), .DEPTH(TXN_DEPTH)) u_txn_q (
    .clk, .rst_n, .in_valid(s_txn_valid), .in_ready(s_txn_ready), .in_data(s_txn),
    .out_valid(tq_valid), .out_ready(tq_ready), .out_data(tq_head), .count()
  );

  // linear to physical address translation, command queue
  phys_addr_t tq_pa;
  dram_cmd_t  cq_in, cq_head;
  logic       cq_valid, cq_ready;
  addr_xlate u_xlate (.laddr(tq_head.laddr), .pa(tq_pa));
  assign cq_in = '{we: tq_head.we, pa: tq_pa, txn: tq_head};
  sync_fifo #(.T(dram_cmd_t), .DEPTH(CMD_DEPTH)) u_cmd_q (
    .clk, .rst_n, .in_valid(tq_valid), .in_ready(tq_ready), .in_data(cq_in),
    .out_valid(cq_valid), .out_ready(cq_ready), .out_data(cq_head), .count()
  );

  // write path: ECC encoder + hash, write queue
  logic   ew_valid, ew_ready, wq_valid, wq_ready;
  wline_t ew_wline, wq_head;
  ecc_write_path u_wpath (
    .clk, .rst_n, .in_valid(s_wr_valid), .in_ready(s_wr_ready), .in_line(s_wr_line),
    .out_valid(ew_valid), .out_ready(ew_ready), .out_wline(ew_wline)
  );
  sync_fifo #(.T(wline_t), .DEPTH(WQ_DEPTH)) u_wr_q (
    .clk, .rst_n, .in_valid(ew_valid), .in_ready(ew_ready), .in_data(ew_wline),
    .out_valid(wq_valid), .out_ready(wq_ready), .out_data(wq_head), .count()
  );

  // command issue: a write needs its data, a read needs an in-flight slot
  logic inf_in_ready, inf_valid, inf_ready, cmd_fire, inf_room;
  txn_t inf_head;
  logic [$clog2(RD_LINES+1)-1:0] inf_count;
  // Room is judged on the occupancy alone, not on a pop in the same cycle.
  assign inf_room       = inf_count != ($clog2(RD_LINES+1))'(RD_LINES);
  assign dram_cmd_valid = cq_valid && (cq_head.we ? wq_valid : inf_room);
  assign dram_cmd_we    = cq_head.we;
  assign dram_cmd_pa    = cq_head.pa;
  assign dram_wdata     = wq_head;
  assign cmd_fire       = dram_cmd_valid && dram_cmd_ready;
  assign cq_ready       = cmd_fire;
  assign wq_ready       = cmd_fire && cq_head.we;

  sync_fifo #(.T(txn_t), .DEPTH(RD_LINES)) u_inflight (
    .clk, .rst_n, .in_valid(cmd_fire && !cq_head.we), .in_ready(inf_in_ready),
    .in_data(cq_head.txn),
    .out_valid(inf_valid), .out_ready(inf_ready), .out_data(inf_head), .count(inf_count)
  );

  // read buffer (raw 73-bit received beats)
  logic  rb_in_ready, rb_valid, rb_ready;
  beat_t rb_head;
  sync_fifo #(.T(beat_t), .DEPTH(RD_LINES * BURST)) u_rd_buf (
    .clk, .rst_n, .in_valid(dram_rd_valid), .in_ready(rb_in_ready), .in_data(dram_rd_beat),
    .out_valid(rb_valid), .out_ready(rb_ready), .out_data(rb_head), .count()
  );

  // read path
  logic                 rp_rsp_valid, rp_rsp_ready;
  mem_rsp_t             rp_rsp;
  logic                 pb_shift_en, pb_hash_load, due_event, ce_event, overflow_event;
  cw_t                  pb_shift_data;
  logic [HASH_BITS-1:0] rp_hash, pb_hash;
  logic [BURST-1:0]     due_mask, ce_mask;
  laddr_t               due_laddr;
  tag_t                 due_tag;
  ecc_read_path #(.RETRY_EN(RETRY_EN)) u_rpath (
    .clk, .rst_n,
    .beat_valid(rb_valid), .beat_ready(rb_ready), .beat(rb_head),
    .inf_valid, .inf_ready, .inf(inf_head),
    .retry_valid, .retry_ready, .retry_txn,
    .rsp_valid(rp_rsp_valid), .rsp_ready(rp_rsp_ready), .rsp(rp_rsp),
    .service_req, .pb_shift_en, .pb_shift_data, .pb_hash_load, .pb_hash(rp_hash),
    .due_event, .due_mask, .ce_mask, .due_laddr, .due_tag, .ce_event, .overflow_event
  );

  // Penalty Box and error status registers
  logic [BURST-1:0][N-1:0]  pb_entries;
  logic                     pb_wr_en;
  logic [$clog2(BURST)-1:0] pb_wr_idx;
  cw_t                      pb_wr_data;
  logic                     rel_valid, rel_ready;
  rsp_status_e              rel_status;
  tag_t                     rel_tag;
  penalty_box u_pbox (
    .clk, .rst_n, .shift_en(pb_shift_en), .shift_in(pb_shift_data),
    .hash_load(pb_hash_load), .hash_in(rp_hash),
    .wr_en(pb_wr_en), .wr_idx(pb_wr_idx), .wr_data(pb_wr_data),
    .hash(pb_hash), .entries(pb_entries)
  );
  sdecc_csr u_csr (
    .clk, .rst_n, .due_event, .due_mask, .ce_mask, .due_laddr, .due_tag,
    .ce_event, .overflow_event, .service_req, .nmi,
    .cfg_valid, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rvalid, .cfg_rdata,
    .pb_entries, .pb_hash, .pb_wr_en, .pb_wr_idx, .pb_wr_data,
    .rel_valid, .rel_ready, .rel_status, .rel_tag
  );

  // data buffer: read-path responses first, then the released Penalty Box line
  logic     db_in_valid, db_in_ready;
  mem_rsp_t db_in, rel_rsp;
  always_comb begin
    rel_rsp.tag    = rel_tag;
    rel_rsp.status = rel_status;
    for (int b = 0; b < BURST; b++) rel_rsp.rdata[b] = pb_entries[b][K-1:0];
  end
  assign db_in_valid  = rp_rsp_valid || rel_valid;
  assign db_in        = rp_rsp_valid ? rp_rsp : rel_rsp;
  assign rp_rsp_ready = db_in_ready;
  assign rel_ready    = db_in_ready && !rp_rsp_valid;
  sync_fifo #(.T(mem_rsp_t), .DEPTH(RSP_DEPTH)) u_data_buf (
    .clk, .rst_n, .in_valid(db_in_valid), .in_ready(db_in_ready), .in_data(db_in),
    .out_valid(rsp_valid), .out_ready(rsp_ready), .out_data(rsp), .count()
  );

  // The read buffer can always take a returning beat.
  a_inf_room: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_fire && !cq_head.we |-> inf_in_ready);
  a_rd_buf_room: assert property (@(posedge clk) disable iff (!rst_n)
    dram_rd_valid |-> rb_in_ready);

endmodule
