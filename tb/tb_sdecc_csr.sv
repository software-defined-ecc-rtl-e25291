// tb_sdecc_csr: self-checking test of the SDECC error status registers and
// configuration interface, with a Penalty Box attached.
// Checks: a due_event sets SERVICE_REQ and pulses nmi for exactly one cycle;
// ERROR_TYPE, PHY_ADDR, ECC_ID, HASH, TAG and CE_COUNT read back with
// one-cycle latency; Penalty Box entries read back in two halves and can be
// written back only while in service; CONTROL release/abandon raises
// rel_valid with the right status until rel_ready, which clears SERVICE_REQ;
// an overflow event sets ERROR_TYPE bit 16; a second due_event while in
// service does not overwrite the latched state.
module tb_sdecc_csr;
  import sdecc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic due_event, ce_event, overflow_event, service_req, nmi;
  logic [7:0] due_mask, ce_mask;
  laddr_t due_laddr;
  tag_t due_tag;
  logic cfg_valid, cfg_we, cfg_rvalid;
  logic [7:0] cfg_addr;
  logic [63:0] cfg_wdata, cfg_rdata;
  logic [BURST-1:0][N-1:0] pb_entries;
  logic [7:0] pb_hash;
  logic pb_wr_en;
  logic [2:0] pb_wr_idx;
  cw_t pb_wr_data;
  logic rel_valid, rel_ready;
  rsp_status_e rel_status;
  tag_t rel_tag;
  int nmi_count = 0;

  sdecc_csr dut (.*);
  penalty_box u_pb (.clk, .rst_n, .shift_en(1'b0), .shift_in('0), .hash_load(due_event),
                    .hash_in(8'hC3), .wr_en(pb_wr_en), .wr_idx(pb_wr_idx), .wr_data(pb_wr_data),
                    .hash(pb_hash), .entries(pb_entries));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && nmi) nmi_count++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic cfg_write(logic [7:0] a, logic [63:0] d);
    @(negedge clk);
    cfg_valid = 1; cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_valid = 0; cfg_we = 0;
  endtask

  task automatic cfg_read(logic [7:0] a, output logic [63:0] d);
    @(negedge clk);
    cfg_valid = 1; cfg_we = 0; cfg_addr = a;
    @(posedge clk);
    #1;
    cfg_valid = 0;
    check(cfg_rvalid, "read data valid after one cycle");
    d = cfg_rdata;
  endtask

  initial begin
    logic [63:0] d;
    cw_t w;
    due_event = 0; ce_event = 0; overflow_event = 0; due_mask = 0; ce_mask = 0;
    due_laddr = 0; due_tag = 0; cfg_valid = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    rel_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    cfg_read(8'h03, d); check(d == 64'h1, "ECC_ID");
    cfg_read(8'h01, d); check(d == 0, "SERVICE_REQ clear after reset");
    // writes outside service are ignored
    cfg_write(8'h10, 64'hDEAD);
    cfg_read(8'h10, d); check(d == 0, "entry write ignored outside service");
    cfg_write(8'h05, 64'h1);
    check(!rel_valid, "CONTROL ignored outside service");
    for (int rep = 0; rep < 20; rep++) begin
      // corrected errors
      @(negedge clk); ce_event = 1; @(negedge clk); ce_event = 0;
      cfg_read(8'h06, d); check(d == 64'(rep + 1), "CE_COUNT");
      // a DUE
      @(negedge clk);
      due_event = 1; due_mask = 8'(1 << (rep % 8)); ce_mask = 8'h40; due_laddr = laddr_t'($urandom);
      due_tag = 8'(rep);
      @(posedge clk); #1;
      check(service_req && nmi, "SERVICE_REQ and nmi after due_event");
      @(negedge clk);
      due_event = 0;
      @(posedge clk); #1;
      check(!nmi && service_req, "nmi is one pulse");
      // a second DUE must not overwrite
      @(negedge clk); due_event = 1; due_tag = 8'hEE; overflow_event = 1;
      @(negedge clk); due_event = 0; overflow_event = 0;
      cfg_read(8'h00, d); check(d == 64'({1'b1, 8'h40, 8'(1 << (rep % 8))}), "ERROR_TYPE with overflow");
      cfg_read(8'h02, d); check(d == 64'({due_laddr, 6'b0}), "PHY_ADDR");
      cfg_read(8'h07, d); check(d == 64'(rep), "TAG kept");
      cfg_read(8'h04, d); check(d == 64'hC3, "HASH");
      // write back and read back all entries
      for (int b = 0; b < BURST; b++) begin
        w = {8'(b * 17 + rep), $urandom, $urandom};
        cfg_write(8'(8'h10 + 2 * b), w[63:0]);
        cfg_write(8'(8'h11 + 2 * b), 64'(w[71:64]));
        check(pb_entries[b] == w, "entry written");
        cfg_read(8'(8'h10 + 2 * b), d); check(d == w[63:0], "entry low");
        cfg_read(8'(8'h11 + 2 * b), d); check(d == 64'(w[71:64]), "entry high");
      end
      // release or abandon
      cfg_write(8'h05, (rep % 2 == 0) ? 64'h1 : 64'h2);
      check(rel_valid && rel_tag == 8'(rep), "release offered");
      check(rel_status == ((rep % 2 == 0) ? RSP_RECOVERED : RSP_POISON), "release status");
      repeat (3) @(negedge clk);
      check(rel_valid && service_req, "release held until accepted");
      rel_ready = 1;
      @(negedge clk);
      rel_ready = 0;
      check(!rel_valid && !service_req, "SERVICE_REQ cleared on release");
    end
    check(nmi_count == 20, "one nmi per captured DUE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
