// tlb: fully associative translation lookaside buffer of ENTRIES entries.
// A lookup compares the virtual page number of `va` with every valid entry
// in parallel; on a hit `pa` is the physical page number of that entry
// joined with the page offset of `va`. Entries are written through the fill
// port by whatever handles TLB misses outside the cache; a fill for a page
// that is already present overwrites that entry, otherwise the entry chosen
// by a round-robin pointer is replaced. The ETA cache uses two identical
// copies: the data cache TLB and the LSQ TLB, filled together.
// Sizes, replacement and the fill port are this design's choices.
// Timing: lookup is combinational, fills take effect at the clock edge.
module tlb #(
  parameter int VA_W      = 32,
  parameter int PA_W      = 32,
  parameter int PAGE_BITS = 12,
  parameter int ENTRIES   = 8,
  parameter int VPN_W     = VA_W - PAGE_BITS,
  parameter int PPN_W     = PA_W - PAGE_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [VA_W-1:0]  va,
  output logic             hit,
  output logic [PA_W-1:0]  pa,
  input  logic             fill_en,
  input  logic [VPN_W-1:0] fill_vpn,
  input  logic [PPN_W-1:0] fill_ppn
);
  localparam int EW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [ENTRIES-1:0]            valid_q;
  logic [ENTRIES-1:0][VPN_W-1:0] vpn_q;
  logic [ENTRIES-1:0][PPN_W-1:0] ppn_q;
  logic [EW-1:0]                 rr_q;
  logic                          fill_hit;
  logic [EW-1:0]                 fill_idx;
  logic [PPN_W-1:0]              ppn;

  always_comb begin
    hit = 1'b0;
    ppn = '0;
    for (int e = 0; e < ENTRIES; e++) begin
      if (valid_q[e] && vpn_q[e] == va[VA_W-1:PAGE_BITS]) begin
        hit = 1'b1;
        ppn = ppn_q[e];
      end
    end
    pa = {ppn, va[PAGE_BITS-1:0]};
  end

  always_comb begin
    fill_hit = 1'b0;
    fill_idx = rr_q;
    for (int e = 0; e < ENTRIES; e++) begin
      if (valid_q[e] && vpn_q[e] == fill_vpn) begin
        fill_hit = 1'b1;
        fill_idx = EW'(e);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      vpn_q   <= '0;
      ppn_q   <= '0;
      rr_q    <= '0;
    end else if (fill_en) begin
      valid_q[fill_idx] <= 1'b1;
      vpn_q[fill_idx]   <= fill_vpn;
      ppn_q[fill_idx]   <= fill_ppn;
      if (!fill_hit) rr_q <= (rr_q == EW'(ENTRIES - 1)) ? '0 : rr_q + 1'b1;
    end
  end
endmodule
