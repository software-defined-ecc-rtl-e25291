// sdecc_csr: SDECC error status registers and device configuration interface.
//
// When the read path reports a DUE on a demand read (due_event), the block
// latches ERROR_TYPE, PHY_ADDR and the requester's tag, sets SERVICE_REQ and
// pulses nmi for one cycle (the error-reporting interrupt to the OS). The
// Penalty Box is then held for software. System software reads the registers
// and the Penalty Box over the configuration bus, writes the recovery target
// back into the Penalty Box, and writes CONTROL: bit 0 releases the blocked
// read with the recovered line (RSP_RECOVERED), bit 1 abandons recovery
// (RSP_POISON, the OS panics or rolls back). The release is offered on
// rel_valid until the controller accepts it (rel_ready); SERVICE_REQ then
// clears. The register names follow the SDECC architecture; widths, addresses
// and the CONTROL, CE_COUNT and TAG registers are this design's choices.
//
// Register map (64-bit registers, word addresses on cfg_addr):
//   0x00 ERROR_TYPE  [7:0] codewords with a DUE, [15:8] codewords with a CE,
//                    [16] a further DUE was poisoned while in service   (RO)
//   0x01 SERVICE_REQ [0]                                                (RO)
//   0x02 PHY_ADDR    byte address of the afflicted cacheline            (RO)
//   0x03 ECC_ID      code in use (ECC_ID parameter)                     (RO)
//   0x04 HASH        original cacheline hash from memory                (RO)
//   0x05 CONTROL     write: [0] release recovered, [1] abandon          (WO)
//   0x06 CE_COUNT    corrected-error count                              (RO)
//   0x07 TAG         tag of the blocked request                         (RO)
//   0x10+2i          Penalty Box entry i, message bits [63:0]           (RW)
//   0x11+2i          Penalty Box entry i, parity bits [71:64]           (RW)
// Writes to entries and CONTROL are ignored unless SERVICE_REQ is set.
// Timing: a read returns cfg_rdata with cfg_rvalid one cycle after cfg_valid.
module sdecc_csr
  import sdecc_pkg::*;
#(
  parameter logic [7:0] ECC_ID = ECC_ID_HSIAO_72_64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // events from the read path
  input  logic                     due_event,
  input  logic [BURST-1:0]         due_mask,
  input  logic [BURST-1:0]         ce_mask,
  input  laddr_t                   due_laddr,
  input  tag_t                     due_tag,
  input  logic                     ce_event,
  input  logic                     overflow_event,
  output logic                     service_req,
  output logic                     nmi,
  // configuration bus
  input  logic                     cfg_valid,
  input  logic                     cfg_we,
  input  logic [7:0]               cfg_addr,
  input  logic [63:0]              cfg_wdata,
  output logic                     cfg_rvalid,
  output logic [63:0]              cfg_rdata,
  // Penalty Box access
  input  logic [BURST-1:0][N-1:0]  pb_entries,
  input  logic [HASH_BITS-1:0]     pb_hash,
  output logic                     pb_wr_en,
  output logic [$clog2(BURST)-1:0] pb_wr_idx,
  output logic [N-1:0]             pb_wr_data,
  // release of the blocked read
  output logic                     rel_valid,
  input  logic                     rel_ready,
  output rsp_status_e              rel_status,
  output tag_t                     rel_tag
);

  localparam logic [7:0] A_ERROR_TYPE = 8'h00, A_SERVICE_REQ = 8'h01,
                         A_PHY_ADDR   = 8'h02, A_ECC_ID      = 8'h03,
                         A_HASH       = 8'h04, A_CONTROL     = 8'h05,
                         A_CE_COUNT   = 8'h06, A_TAG         = 8'h07,
                         A_PBOX       = 8'h10;

  logic [BURST-1:0] due_mask_q, ce_mask_q;
  logic             overflow_q;
  laddr_t           laddr_q;
  tag_t             tag_q;
  logic [63:0]      ce_count;
  logic             is_pbox;
  logic [$clog2(BURST)-1:0] pb_idx;
  logic             pb_hi;
  logic             ctl_write;

  assign is_pbox   = cfg_addr >= A_PBOX && cfg_addr < A_PBOX + 8'(2 * BURST);
  assign pb_idx    = cfg_addr[1 +: $clog2(BURST)];
  assign pb_hi     = cfg_addr[0];
  assign ctl_write = cfg_valid && cfg_we && cfg_addr == A_CONTROL && service_req && !rel_valid;

  // Penalty Box write-back: read-modify-write of the addressed half.
  always_comb begin
    pb_wr_en   = cfg_valid && cfg_we && is_pbox && service_req && !rel_valid;
    pb_wr_idx  = pb_idx;
    pb_wr_data = pb_hi ? {cfg_wdata[R-1:0], pb_entries[pb_idx][K-1:0]}
                       : {pb_entries[pb_idx][N-1:K], cfg_wdata};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      service_req <= 1'b0;
      nmi         <= 1'b0;
      due_mask_q  <= '0;
      ce_mask_q   <= '0;
      overflow_q  <= 1'b0;
      laddr_q     <= '0;
      tag_q       <= '0;
      ce_count    <= '0;
      rel_valid   <= 1'b0;
      rel_status  <= RSP_POISON;
      cfg_rvalid  <= 1'b0;
      cfg_rdata   <= '0;
    end else begin
      nmi <= 1'b0;
      if (ce_event) ce_count <= ce_count + 1'b1;
      if (due_event && !service_req) begin
        service_req <= 1'b1;
        nmi         <= 1'b1;
        due_mask_q  <= due_mask;
        ce_mask_q   <= ce_mask;
        laddr_q     <= due_laddr;
        tag_q       <= due_tag;
        overflow_q  <= 1'b0;
      end
      if (overflow_event && service_req) overflow_q <= 1'b1;
      if (ctl_write && (cfg_wdata[0] || cfg_wdata[1])) begin
        rel_valid  <= 1'b1;
        rel_status <= cfg_wdata[0] ? RSP_RECOVERED : RSP_POISON;
      end
      if (rel_valid && rel_ready) begin
        rel_valid   <= 1'b0;
        service_req <= 1'b0;
      end
      cfg_rvalid <= cfg_valid && !cfg_we;
      if (cfg_valid && !cfg_we) begin
        cfg_rdata <= '0;
        if (is_pbox) begin
          cfg_rdata <= pb_hi ? 64'(pb_entries[pb_idx][N-1:K]) : pb_entries[pb_idx][K-1:0];
        end else begin
          case (cfg_addr)
            A_ERROR_TYPE:  cfg_rdata <= 64'({overflow_q, ce_mask_q, due_mask_q});
            A_SERVICE_REQ: cfg_rdata <= 64'(service_req);
            A_PHY_ADDR:    cfg_rdata <= 64'({laddr_q, 6'b0});
            A_ECC_ID:      cfg_rdata <= 64'(ECC_ID);
            A_HASH:        cfg_rdata <= 64'(pb_hash);
            A_CE_COUNT:    cfg_rdata <= ce_count;
            A_TAG:         cfg_rdata <= 64'(tag_q);
            default:       cfg_rdata <= '0;
          endcase
        end
      end
    end
  end

  assign rel_tag = tag_q;

  // Rules of the service handshake.
  a_nmi_sets_req: assert property (@(posedge clk) disable iff (!rst_n)
    nmi |-> service_req);
  a_rel_held: assert property (@(posedge clk) disable iff (!rst_n)
    rel_valid && !rel_ready |=> rel_valid);

endmodule
