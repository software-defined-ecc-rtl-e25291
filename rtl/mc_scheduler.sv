// mc_scheduler: picks the next transaction of the memory controller.
//
// Two sources compete: read-retries issued by the read path after a first
// DUE, and new requests at the head of the request queue. A retry always
// wins, so a suspected DUE is re-read before newer traffic is admitted. A
// read request moves into the transaction queue when that has room. A write
// request moves only when both the transaction queue and the write path can
// take it in the same cycle, so the write data enters the encoder and write
// queue in the same order as the write commands. The retry priority is this
// design's choice; the scheduler itself is only named in the controller's
// block diagram. Combinational.
module mc_scheduler
  import sdecc_pkg::*;
(
  input  logic     retry_valid,
  output logic     retry_ready,
  input  txn_t     retry_txn,
  input  logic     req_valid,
  output logic     req_ready,
  input  mem_req_t req,
  output logic     txn_valid,
  input  logic     txn_ready,
  output txn_t     txn,
  output logic     wr_valid,
  input  logic     wr_ready,
  output line_t    wr_line
);

  always_comb begin
    retry_ready = 1'b0;
    req_ready   = 1'b0;
    txn_valid   = 1'b0;
    wr_valid    = 1'b0;
    wr_line     = req.wdata;
    txn         = retry_txn;
    if (retry_valid) begin
      txn_valid   = 1'b1;
      retry_ready = txn_ready;
    end else if (req_valid) begin
      txn = '{tag: req.tag, we: req.we, prefetch: req.prefetch,
              retried: 1'b0, laddr: req.laddr};
      if (req.we) begin
        txn_valid = wr_ready;
        wr_valid  = txn_ready;
        req_ready = txn_ready && wr_ready;
      end else begin
        txn_valid = 1'b1;
        req_ready = txn_ready;
      end
    end
  end

endmodule
