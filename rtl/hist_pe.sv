// hist_pe: one processing element of the joint-histogram stage.
//
// Holds a private partial joint histogram of 2^(2B) counters in a simple
// dual-port memory (one read, one write per cycle, synchronous read). For
// every valid pixel pair it increments bin {ref_px, flt_px}: the read is
// issued in the cycle the pair arrives, the incremented count is written in
// the next one. A pair that hits the bin written in the previous cycle takes
// the count from a forwarding register, so back-to-back hits on one bin are
// counted correctly at one pair per cycle.
// Drain port: rd_en reads bin rd_addr (rd_data valid the next cycle, and held
// until the next rd_en) and writes zero to it in the same cycle, so reducing
// the histogram also clears it for the next image. rd_en and in_valid must
// not be high together.
//
// Private per-PE histograms merged afterwards follow the source; the memory
// organisation, forwarding and clear-on-read are this design's own.
module hist_pe #(
  parameter int unsigned B     = 8,
  parameter int unsigned CNT_W = 15
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [B-1:0]     ref_px,
  input  logic [B-1:0]     flt_px,
  input  logic             rd_en,
  input  logic [2*B-1:0]   rd_addr,
  output logic [CNT_W-1:0] rd_data
);
  localparam int unsigned BINS = 1 << (2*B);

  logic [CNT_W-1:0] mem [BINS];

  logic             va;        // pair in the update stage
  logic [2*B-1:0]   aa;
  logic             wv;        // write done at the last edge
  logic [2*B-1:0]   wa;
  logic [CNT_W-1:0] wd;
  logic [CNT_W-1:0] cur, upd;

  assign cur = (wv && wa == aa) ? wd : rd_data;
  assign upd = cur + 1'b1;

  always_ff @(posedge clk) begin
    if (in_valid)   rd_data <= mem[{ref_px, flt_px}];
    else if (rd_en) rd_data <= mem[rd_addr];
    if (va)         mem[aa] <= upd;
    else if (rd_en) mem[rd_addr] <= '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      va <= 1'b0; aa <= '0; wv <= 1'b0; wa <= '0; wd <= '0;
    end else begin
      va <= in_valid;
      aa <= {ref_px, flt_px};
      wv <= va;
      wa <= aa;
      wd <= upd;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && rd_en));
  // A clear must not land in the cycle that writes an increment.
  assert property (@(posedge clk) disable iff (!rst_n) !(va && rd_en));

endmodule
