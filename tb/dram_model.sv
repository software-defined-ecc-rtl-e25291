// dram_model: behavioural model of a rank of DRAM behind the DDR PHY, for
// testbenches only (not synthesizable).
//
// Accepts one command per cycle when ready (ready can be thinned out with
// READY_PCT). A write stores the eight 73-bit beats of a cacheline; a read
// returns them RL cycles later, one beat per cycle, in command order.
// Locations never written read as all-zero beats (a valid codeword with a
// zero hash). Faults: set_fault() XORs a 73-bit mask into one beat of one
// location on every later read (a persistent fault) or on the next read only
// (a transient fault). reads_of() counts reads per location.
module dram_model
  import sdecc_pkg::*;
#(
  parameter int RL        = 10,
  parameter int READY_PCT = 100
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cmd_valid,
  output logic       cmd_ready,
  input  logic       cmd_we,
  input  phys_addr_t cmd_pa,
  input  wline_t     wdata,
  output logic       rd_valid,
  output beat_t      rd_beat
);

  typedef struct {
    longint due;
    wline_t data;
  } pending_t;

  wline_t   store     [phys_addr_t];
  wline_t   persist   [phys_addr_t];
  wline_t   transient [phys_addr_t];
  int       nreads    [phys_addr_t];
  pending_t pend [$];
  longint   now;
  int       beat_idx;

  function automatic void set_fault(phys_addr_t pa, int beat, beat_t mask, bit persistent);
    wline_t m;
    if (persistent) begin
      m = persist.exists(pa) ? persist[pa] : '0;
      m[beat] ^= mask;
      persist[pa] = m;
    end else begin
      m = transient.exists(pa) ? transient[pa] : '0;
      m[beat] ^= mask;
      transient[pa] = m;
    end
  endfunction

  function automatic void clear_faults(phys_addr_t pa);
    persist.delete(pa);
    transient.delete(pa);
  endfunction

  function automatic int reads_of(phys_addr_t pa);
    return nreads.exists(pa) ? nreads[pa] : 0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cmd_ready <= 1'b0;
    else        cmd_ready <= ($urandom_range(99) < READY_PCT);
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now      <= 0;
      beat_idx <= 0;
      rd_valid <= 1'b0;
      rd_beat  <= '0;
    end else begin
      pending_t p;
      wline_t   d;
      now <= now + 1;
      if (cmd_valid && cmd_ready) begin
        if (cmd_we) begin
          store[cmd_pa] = wdata;
          transient.delete(cmd_pa);
        end else begin
          d = store.exists(cmd_pa) ? store[cmd_pa] : '0;
          if (persist.exists(cmd_pa)) d ^= persist[cmd_pa];
          if (transient.exists(cmd_pa)) begin
            d ^= transient[cmd_pa];
            transient.delete(cmd_pa);
          end
          nreads[cmd_pa] = reads_of(cmd_pa) + 1;
          p.due  = now + longint'(RL);
          p.data = d;
          pend.push_back(p);
        end
      end
      rd_valid <= 1'b0;
      if (pend.size() > 0 && pend[0].due <= now) begin
        rd_valid <= 1'b1;
        rd_beat  <= pend[0].data[beat_idx];
        if (beat_idx == BURST - 1) begin
          beat_idx <= 0;
          void'(pend.pop_front());
        end else begin
          beat_idx <= beat_idx + 1;
        end
      end
    end
  end

endmodule
