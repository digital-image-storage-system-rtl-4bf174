// bbt_ram: the invalid-block table, held as an ascending list of the block
// addresses of invalid block groups.
//
// At power-up the flash controller scans the flash and appends the even block
// address of every group it finds invalid (a group is all blocks written
// together in one pass of the plane slots; if any of them, in either flash
// chip, is invalid, the whole group is). During erase, write and read the
// controller keeps a pointer (the "RAM address") into this list: the current
// group is skipped when its address equals the entry under the pointer, and
// the pointer then advances. Storing addresses rather than one flag per block
// follows the published write flow, where the RAM address advances only on
// an invalid block; the list depth and width are this design's choice.
// DEPTH entries; an unused slot reads as all ones, an address no group has.
// Interface: append port (app_en, app_addr) and one combinational
// lookup port (rd_idx -> rd_addr); clear empties the list. Synchronous reset.
module bbt_ram #(
  parameter int unsigned DEPTH  = 2048,
  parameter int unsigned AWIDTH = 13
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      clear,
  input  logic                      app_en,
  input  logic [AWIDTH-1:0]         app_addr,
  input  logic [$clog2(DEPTH):0]    rd_idx,
  output logic [AWIDTH-1:0]         rd_addr,
  output logic [$clog2(DEPTH):0]    n_entries
);
  logic [AWIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (app_en && n_entries < ($clog2(DEPTH)+1)'(DEPTH)) mem[n_entries[$clog2(DEPTH)-1:0]] <= app_addr;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) n_entries <= '0;
    else if (app_en && n_entries < ($clog2(DEPTH)+1)'(DEPTH)) n_entries <= n_entries + 1'b1;
  end

  assign rd_addr = (rd_idx < n_entries) ? mem[rd_idx[$clog2(DEPTH)-1:0]] : '1;

  // Entries must be appended in ascending order for the skip logic to work.
  a_ascending: assert property (@(posedge clk) disable iff (rst || clear)
    (app_en && n_entries != 0) |-> (app_addr > mem[n_entries[$clog2(DEPTH)-1:0] - 1'b1]));
endmodule
