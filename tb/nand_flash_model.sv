// nand_flash_model: behavioural model of one 8-bit large-page NAND flash
// package with N_CE chip enables (one die each), for simulation only.
//
// Each die has BLOCKS blocks of PAGES pages of PAGE_BYTES data bytes plus a
// spare area, in four planes (even/odd blocks of the lower half are planes
// 0/1, of the upper half planes 2/3). It accepts page program (80h, 5
// address cycles, data, 10h), page read (00h, 5 address cycles, 30h, then
// data with RE#) and block erase (60h, 3 row cycles, D0h). Bus cycles are
// taken on the rising edge of WE# and RE#, seen at the rising clock edge.
// After a program confirm R/B# is low for T_RB clocks while the page moves
// into its plane; the plane then programs for T_PROG clocks in the
// background. A program confirm to a plane still programming counts as a
// violation (prog_violations), as does any command while R/B# is low.
// Read holds R/B# low T_R clocks, erase T_BERS clocks. Invalid blocks (set
// with mark_bad) return 00h as the first spare byte of page 0. Storage is
// sparse: unwritten bytes read FFh.
module nand_flash_model #(
  parameter int unsigned PAGE_BYTES = 4096,
  parameter int unsigned SPARE      = 128,
  parameter int unsigned PAGES      = 64,
  parameter int unsigned BLOCKS     = 8192,
  parameter int unsigned N_CE       = 2,
  parameter int unsigned T_RB       = 3,
  parameter int unsigned T_PROG     = 100,
  parameter int unsigned T_R        = 10,
  parameter int unsigned T_BERS     = 20
) (
  input  logic            clk,
  input  logic [N_CE-1:0] ce_n,
  input  logic            cle,
  input  logic            ale,
  input  logic            we_n,
  input  logic            re_n,
  input  logic [7:0]      io_in,
  output logic [7:0]      io_out,
  output logic [N_CE-1:0] rb_n
);
  typedef logic [7:0] bytes_t [];
  bytes_t          store [longint];     // key: die, row
  bit              bad   [longint];     // key: die, block
  bytes_t          pbuf  [N_CE];
  int              rb_cnt [N_CE];
  int              plane_busy [N_CE][4];
  logic [7:0]      cmd   [N_CE];
  int              acnt  [N_CE];
  logic [7:0]      abuf  [N_CE][5];
  int              col   [N_CE];
  int              row   [N_CE];
  logic            we_q = 1'b1, re_q = 1'b1;

  int prog_count = 0, read_count = 0, erase_count = 0;
  int prog_violations = 0, busy_violations = 0;

  function automatic longint pkey(int d, int r);
    return longint'(d) * longint'(BLOCKS * PAGES) + longint'(r);
  endfunction
  function automatic int plane_of(int blk);
    return (blk % 2) + ((blk >= int'(BLOCKS / 2)) ? 2 : 0);
  endfunction

  // byte at (die, row, column) as stored, for checking
  function automatic logic [7:0] peek(int d, int r, int c);
    longint k;
    k = pkey(d, r);
    if (store.exists(k)) return store[k][c];
    return 8'hFF;
  endfunction

  task automatic mark_bad(int d, int blk);
    bad[longint'(d) * BLOCKS + blk] = 1'b1;
  endtask

  function automatic logic [7:0] read_byte(int d);
    int blk;
    longint k;
    blk = row[d] / PAGES;
    k   = pkey(d, row[d]);
    if (col[d] == int'(PAGE_BYTES) && (row[d] % PAGES) == 0 &&
        bad.exists(longint'(d) * BLOCKS + blk)) return 8'h00;
    if (store.exists(k) && col[d] < int'(PAGE_BYTES + SPARE)) return store[k][col[d]];
    return 8'hFF;
  endfunction

  // read data is driven while RE# is low
  always_comb begin
    io_out = 8'hFF;
    for (int d = 0; d < N_CE; d++) if (!ce_n[d] && !re_n) io_out = read_byte(d);
  end

  always_comb for (int d = 0; d < N_CE; d++) rb_n[d] = (rb_cnt[d] == 0);

  initial begin
    for (int d = 0; d < N_CE; d++) begin
      rb_cnt[d] = 0; cmd[d] = 8'hFF; acnt[d] = 0; col[d] = 0; row[d] = 0;
      for (int p = 0; p < 4; p++) plane_busy[d][p] = 0;
    end
  end

  always @(posedge clk) begin
    for (int d = 0; d < N_CE; d++) begin
      if (rb_cnt[d] > 0) rb_cnt[d]--;
      for (int p = 0; p < 4; p++) if (plane_busy[d][p] > 0) plane_busy[d][p]--;
    end
    for (int d = 0; d < N_CE; d++) begin
      if (ce_n[d]) continue;
      if (!we_q && we_n) begin                      // WE# rising edge
        if (cle) begin
          if (rb_cnt[d] != 0) busy_violations++;
          case (io_in)
            8'h80: begin cmd[d] = 8'h80; acnt[d] = 0; pbuf[d] = new[PAGE_BYTES + SPARE]; foreach (pbuf[d][i]) pbuf[d][i] = 8'hFF; end
            8'h00, 8'h60: begin cmd[d] = io_in; acnt[d] = 0; end
            8'h10: begin
              int p;
              p = plane_of(row[d] / PAGES);
              if (plane_busy[d][p] != 0) prog_violations++;
              store[pkey(d, row[d])] = pbuf[d];
              plane_busy[d][p] = T_PROG;
              rb_cnt[d] = T_RB;
              prog_count++;
            end
            8'h30: begin rb_cnt[d] = T_R; read_count++; end
            8'hD0: begin
              int blk;
              blk = row[d] / PAGES;
              for (int pg = 0; pg < int'(PAGES); pg++) store.delete(pkey(d, blk * PAGES + pg));
              rb_cnt[d] = T_BERS;
              erase_count++;
            end
            default: ;
          endcase
        end else if (ale) begin
          abuf[d][acnt[d]] = io_in;
          acnt[d]++;
          if (cmd[d] == 8'h60) begin
            if (acnt[d] == 3) row[d] = {8'h0, abuf[d][2], abuf[d][1], abuf[d][0]};
          end else if (acnt[d] == 5) begin
            col[d] = {abuf[d][1], abuf[d][0]};
            row[d] = {8'h0, abuf[d][4], abuf[d][3], abuf[d][2]};
          end
        end else if (cmd[d] == 8'h80) begin
          if (col[d] < int'(PAGE_BYTES + SPARE)) pbuf[d][col[d]] = io_in;
          col[d]++;
        end
      end
      if (!re_q && re_n) col[d]++;                  // RE# rising edge
    end
    we_q <= we_n;
    re_q <= re_n;
  end
endmodule
