// ecc_read_path: ECC decoding, read-retry and DUE routing for cacheline reads.
//
// Beats of a cacheline come from the read buffer one per cycle. Each 72-bit
// received string is decoded by a SECDED decoder; the corrected message, a
// per-codeword DUE mask, a per-codeword CE mask and the hash bit of the beat
// (bit 72) are collected. While the Penalty Box is free (service_req low),
// every raw received string is also shifted into it, so a DUE line never has
// to be copied later. After the eighth beat the line is complete and the
// block decides, using the head of the in-flight read list (tag, prefetch,
// retried, address):
//   no DUE                     -> response OK, or CORRECTED if a CE occurred
//   DUE on a prefetch          -> response DROPPED (the request is dropped)
//   DUE, first attempt         -> the read is re-issued once (read-retry)
//   DUE again after the retry  -> if the Penalty Box holds this line and is
//                                 free: due_event (hash loaded, SERVICE_REQ
//                                 set by the status registers), no response
//                                 until software releases it
//                              -> otherwise response POISON and
//                                 overflow_event (a DUE while one is in
//                                 service is not recovered)
// Routing DUEs of demand reads to the Penalty Box, dropping prefetch DUEs and
// the retry step follow the SDECC architecture; the single retry, the
// one-cycle decision step and the POISON response are this design's choices.
//
// Timing: one beat per cycle, then one decision cycle (longer if the response
// or retry output is stalled): nine cycles per line at full rate.
module ecc_read_path
  import sdecc_pkg::*;
#(
  parameter bit RETRY_EN = 1'b1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // raw beats from the read buffer
  input  logic                 beat_valid,
  output logic                 beat_ready,
  input  beat_t                beat,
  // head of the in-flight read list
  input  logic                 inf_valid,
  output logic                 inf_ready,
  input  txn_t                 inf,
  // read-retry to the scheduler
  output logic                 retry_valid,
  input  logic                 retry_ready,
  output txn_t                 retry_txn,
  // response to the data buffer
  output logic                 rsp_valid,
  input  logic                 rsp_ready,
  output mem_rsp_t             rsp,
  // Penalty Box and error status registers
  input  logic                 service_req,
  output logic                 pb_shift_en,
  output cw_t                  pb_shift_data,
  output logic                 pb_hash_load,
  output logic [HASH_BITS-1:0] pb_hash,
  output logic                 due_event,
  output logic [BURST-1:0]     due_mask,
  output logic [BURST-1:0]     ce_mask,
  output laddr_t               due_laddr,
  output tag_t                 due_tag,
  output logic                 ce_event,
  output logic                 overflow_event
);

  typedef enum logic [2:0] {
    ACT_RSP_CLEAN, ACT_RSP_DROP, ACT_RETRY, ACT_CAPTURE, ACT_RSP_POISON
  } action_e;

  localparam int CNT_W = $clog2(BURST + 1);

  logic [CNT_W-1:0]     cnt;
  line_t                line_q;
  logic [BURST-1:0]     due_q, ce_q;
  logic [HASH_BITS-1:0] hash_q;
  logic                 captured_q;
  logic                 done, accept, finish;
  action_e              action;

  msg_t                 dec_data;
  cw_t                  dec_cw;
  logic [R-1:0]         dec_syn;
  dec_status_e          dec_status;
  logic [6:0]           dec_pos;

  secded_decoder u_dec (
    .x(beat[N-1:0]), .data(dec_data), .cw(dec_cw), .syndrome(dec_syn),
    .status(dec_status), .err_pos(dec_pos)
  );

  assign done          = (cnt == CNT_W'(BURST));
  assign beat_ready    = !done;
  assign accept        = beat_valid && beat_ready;
  assign pb_shift_en   = accept && !service_req;
  assign pb_shift_data = beat[N-1:0];

  always_comb begin
    if (due_q == '0)                          action = ACT_RSP_CLEAN;
    else if (inf.prefetch)                    action = ACT_RSP_DROP;
    else if (RETRY_EN && !inf.retried)        action = ACT_RETRY;
    else if (captured_q && !service_req)      action = ACT_CAPTURE;
    else                                      action = ACT_RSP_POISON;
  end

  always_comb begin
    rsp.tag   = inf.tag;
    rsp.rdata = line_q;
    case (action)
      ACT_RSP_CLEAN: rsp.status = (ce_q != '0) ? RSP_CORRECTED : RSP_OK;
      ACT_RSP_DROP:  rsp.status = RSP_DROPPED;
      default:       rsp.status = RSP_POISON;
    endcase
    retry_txn         = inf;
    retry_txn.retried = 1'b1;
    rsp_valid   = done && inf_valid &&
                  (action == ACT_RSP_CLEAN || action == ACT_RSP_DROP || action == ACT_RSP_POISON);
    retry_valid = done && inf_valid && action == ACT_RETRY;
    finish      = (rsp_valid && rsp_ready) || (retry_valid && retry_ready) ||
                  (done && inf_valid && action == ACT_CAPTURE);
    inf_ready   = finish;
  end

  assign due_event      = done && inf_valid && action == ACT_CAPTURE;
  assign pb_hash_load   = due_event;
  assign pb_hash        = hash_q;
  assign due_mask       = due_q;
  assign ce_mask        = ce_q;
  assign due_laddr      = inf.laddr;
  assign due_tag        = inf.tag;
  assign ce_event       = finish && ce_q != '0;
  assign overflow_event = rsp_valid && rsp_ready && action == ACT_RSP_POISON;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      due_q      <= '0;
      ce_q       <= '0;
      hash_q     <= '0;
      captured_q <= 1'b0;
    end else if (finish) begin
      cnt <= '0;
    end else if (accept) begin
      cnt <= cnt + 1'b1;
      due_q[cnt[$clog2(BURST)-1:0]] <= (dec_status == DEC_DUE);
      ce_q[cnt[$clog2(BURST)-1:0]]  <= (dec_status == DEC_CE);
      if (cnt < CNT_W'(HASH_BITS)) hash_q[cnt[$clog2(HASH_BITS)-1:0]] <= beat[N];
      captured_q <= (cnt == '0) ? !service_req : (captured_q && !service_req);
    end
  end

  always_ff @(posedge clk) begin
    if (accept) line_q[cnt[$clog2(BURST)-1:0]] <= dec_data;
  end

  // Every decoded line belongs to an issued read.
  a_inflight: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> inf_valid);

endmodule
