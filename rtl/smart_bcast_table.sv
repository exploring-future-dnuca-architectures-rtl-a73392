// smart_bcast_table: per-set migration counters of the smart broadcast.
//
// Every L2 bank keeps one counter per cache set for the blocks whose static home
// it is. The counter holds how many blocks of that set currently live in another
// bank because they were migrated away. On a miss in the home bank the
// controller broadcasts a search to the other banks only when the counter of the
// block's set is above zero; otherwise the block cannot be on chip and is fetched
// from memory directly. inc is raised when a block leaves its home bank by
// migration, dec when such a block comes back home or is replaced or invalidated
// in a foreign bank (that bank sends a message to the home for it).
//
// Interface: rd_set -> rd_nonzero is combinational. inc/dec take effect at the
// next clock edge; both on the same set in one cycle cancel. Counters saturate at
// both ends. Counting per set follows the document; the counter width is this
// design's choice (CW = 8 covers the WAYS*(tiles-1) = 120 blocks a set can have
// away from home at the default size).
module smart_bcast_table #(
  parameter int unsigned SETS = 512,
  parameter int unsigned CW   = 8,
  localparam int unsigned SW  = $clog2(SETS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [SW-1:0] rd_set,
  output logic          rd_nonzero,
  output logic [CW-1:0] rd_count,
  input  logic          inc,
  input  logic [SW-1:0] inc_set,
  input  logic          dec,
  input  logic [SW-1:0] dec_set
);
  logic [CW-1:0] cnt [SETS];

  assign rd_count   = cnt[rd_set];
  assign rd_nonzero = (cnt[rd_set] != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(SETS); s++) cnt[s] <= '0;
    end else if (inc && dec && inc_set == dec_set) begin
      // no change
    end else begin
      if (inc && cnt[inc_set] != '1) cnt[inc_set] <= cnt[inc_set] + 1'b1;
      if (dec && cnt[dec_set] != '0) cnt[dec_set] <= cnt[dec_set] - 1'b1;
    end
  end
endmodule
