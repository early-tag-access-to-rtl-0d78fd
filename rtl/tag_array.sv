// tag_array: tag store of a SETS-set, WAYS-way cache, with one valid bit
// and one parity bit per line and repair of faulty tags from an adjacent
// set.
//
// Lookup: set `rd_set` is read and `rd_tag` is compared only in the ways
// whose bit in `way_en` is set; a way that is not enabled is not activated
// and cannot hit. `way_hit` gives the per-way result, `hit`/`hit_way` the
// encoded one.
//
// Tag protection: the parity bit is written with the tag. When an enabled,
// valid way fails its parity check, the tag is looked for in the two
// adjacent sets (rd_set-1, then rd_set+1, wrapping around): because
// neighbouring lines usually come from the same region of memory, a valid,
// parity-clean tag there that differs from the faulty one in exactly one
// bit is taken as the intact copy. The compare of this cycle already uses
// the repaired tag, and the repaired tag is written back at the clock edge
// (`err_corrected`). If no such copy exists the line is invalidated and
// reads as a miss (`err_uncorrectable`), which is safe because the cache
// is write-through. A tag write in the same cycle takes precedence.
// The parity check and the repair from an adjacent set follow the text; the
// one-bit-distance rule for picking the copy, the search order and the
// invalidation of uncorrectable lines are this design's choices.
//
// inj_*: flips one stored tag bit without touching its parity, to emulate
// a transient error (used by tests; tie inj_en low otherwise).
//
// The data cache uses one instance with way enables driven by the way
// prediction; the LSQ stage uses a second copy with every way enabled, kept
// equal by writing both on each refill.
// Timing: lookup and repair decision are combinational, writes, repairs and
// invalidations take effect at the clock edge.
module tag_array #(
  parameter int SETS  = 64,
  parameter int WAYS  = 2,
  parameter int TAG_W = 24,
  parameter int SW    = $clog2(SETS),
  parameter int WW    = (WAYS > 1) ? $clog2(WAYS) : 1,
  parameter int BW    = $clog2(TAG_W)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SW-1:0]    rd_set,
  input  logic [TAG_W-1:0] rd_tag,
  input  logic [WAYS-1:0]  way_en,
  output logic [WAYS-1:0]  way_hit,
  output logic             hit,
  output logic [WW-1:0]    hit_way,
  input  logic             wr_en,
  input  logic [SW-1:0]    wr_set,
  input  logic [WW-1:0]    wr_way,
  input  logic [TAG_W-1:0] wr_tag,
  input  logic             inj_en,
  input  logic [SW-1:0]    inj_set,
  input  logic [WW-1:0]    inj_way,
  input  logic [BW-1:0]    inj_bit,
  output logic             err_corrected,
  output logic             err_uncorrectable
);
  logic [SETS-1:0][WAYS-1:0] valid_q;
  logic [SETS-1:0][WAYS-1:0] par_q;
  logic [TAG_W-1:0]          tags [SETS][WAYS];

  logic [SW-1:0]             nb_set [2];
  logic [WAYS-1:0]           bad, fixed;
  logic [TAG_W-1:0]          eff_tag [WAYS];

  assign nb_set[0] = rd_set - 1'b1;
  assign nb_set[1] = rd_set + 1'b1;

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      eff_tag[w] = tags[rd_set][w];
      bad[w]     = way_en[w] && valid_q[rd_set][w] && ((^tags[rd_set][w]) != par_q[rd_set][w]);
      fixed[w]   = 1'b0;
      if (bad[w]) begin
        for (int n = 1; n >= 0; n--) begin
          for (int v = WAYS - 1; v >= 0; v--) begin
            if (valid_q[nb_set[n]][v] && ((^tags[nb_set[n]][v]) == par_q[nb_set[n]][v]) &&
                ($countones(tags[nb_set[n]][v] ^ tags[rd_set][w]) == 1)) begin
              fixed[w]   = 1'b1;
              eff_tag[w] = tags[nb_set[n]][v];
            end
          end
        end
      end
      way_hit[w] = way_en[w] && valid_q[rd_set][w] && (!bad[w] || fixed[w]) && (eff_tag[w] == rd_tag);
    end
    hit     = 1'b0;
    hit_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (way_hit[w]) begin
        hit     = 1'b1;
        hit_way = WW'(w);
      end
    end
    err_corrected     = |(bad & fixed);
    err_uncorrectable = |(bad & ~fixed);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else begin
      for (int w = 0; w < WAYS; w++) begin
        if (bad[w] && !fixed[w]) valid_q[rd_set][w] <= 1'b0;
      end
      if (wr_en) valid_q[wr_set][wr_way] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    for (int w = 0; w < WAYS; w++) begin
      if (bad[w] && fixed[w]) tags[rd_set][w] <= eff_tag[w];
    end
    if (inj_en) tags[inj_set][inj_way][inj_bit] <= ~tags[inj_set][inj_way][inj_bit];
    if (wr_en) begin
      tags[wr_set][wr_way]  <= wr_tag;
      par_q[wr_set][wr_way] <= ^wr_tag;
    end
  end
endmodule
