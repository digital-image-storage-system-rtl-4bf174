// nand_ctrl: controller for two paralleled 8-bit NAND flash chips that store
// a 16-bit data stream by alternating page program across plane slots.
//
// Both chips share chip enable, CLE, ALE, WE# and RE#, so every command,
// address and data cycle reaches both at once; chip 1 sits on io[7:0] and
// chip 2 on io[15:8], and commands and addresses are copied onto both halves.
// Each chip keeps its own ready/busy line, and the controller waits until
// both chips of the addressed chip enable are ready before it issues a
// command. One bus cycle (command, address, data write or data read) takes
// two clocks: strobe low, then strobe high. At an 80 MHz clock that is 25 ns
// per cycle, the flash's 40 MB/s per chip, 80 MB/s for the pair.
//
// Flash organisation: each chip enable has BLOCKS blocks of PAGES pages of
// PAGE_WORDS bytes per chip, in four planes: even blocks of the lower half in
// plane 0, odd in plane 1, and likewise the upper half in planes 2 and 3. A
// "group" is the set of blocks that share one even block address b: b, b+1,
// b+BLOCKS/2, b+BLOCKS/2+1 on each chip enable. The write pass runs over
// SLOTS = N_CE*4 plane slots; slot s is chip enable s/4, plane s%4. For one
// page number the controller loads and starts a page program in slot 0, 1,
// ... SLOTS-1 in turn, then moves to the next page, and after the last page
// to the next group. By the time it comes back to a plane, SLOTS-1 other
// page loads (each 4096 x 25 ns = 102.4 us at full size) have passed, which
// exceeds the longest program time, so loading never waits for programming.
//
// Operations:
//  * power-up scan (automatic after reset): reads the invalid-block marker
//    word (column SPARE_COL of page 0) of every block of every group; if any
//    byte in either chip is not FFh, the whole group is recorded as invalid
//    in the invalid-block list (bbt_ram). init_done rises when it ends.
//  * OP_ERASE: block erase of every block of every valid group.
//  * OP_WRITE: alternating page program of the words coming from the FIFO.
//    A word is moved only while the FIFO is at least half full. The pass
//    ends when the last group has been written or, after stop_req, at the
//    end of the page being written. pages_written then holds the count.
//  * OP_READ: reads back pages_written pages in the order they were written
//    and streams the words out on rd_data/rd_valid/rd_ready.
// Invalid groups are skipped by all three. op/op_start is taken only when
// busy is low. Reset is synchronous, active high. rb_n is brought into the
// clock domain by a two-flop synchroniser.
//
// Taken from the published system description: the paralleled pin sharing, separate R/B per chip, the
// plane layout, the order of the write pass (plane slots, then page, then
// group with "block address + 2", ending at block 4094), the FIFO half-full
// gating, whole-group invalidation and the invalid-block address list.
// This design's own choices: two chip enables per chip to make the eight
// plane slots, the NAND command codes and five-cycle addressing, the marker
// location, the erase and read sequences, the stop request and the
// operation handshake.
module nand_ctrl
  import img_store_pkg::*;
#(
  parameter int unsigned PAGE_WORDS = 4096,
  parameter int unsigned SPARE_COL  = PAGE_WORDS,
  parameter int unsigned PAGES      = 64,
  parameter int unsigned BLOCKS     = 8192,
  parameter int unsigned N_CE       = 2,
  parameter int unsigned TWB        = 4
) (
  input  logic        clk,
  input  logic        rst,
  // operation control
  input  op_e         op,
  input  logic        op_start,
  input  logic        stop_req,
  output logic        busy,
  output logic        init_done,
  output logic [31:0] pages_written,
  output logic [$clog2(BLOCKS/4):0] bad_groups,
  // write data from the FIFO (first word fall through)
  input  logic        fifo_half,
  input  logic [15:0] fifo_data,
  output logic        fifo_rd,
  // read-back data
  output logic [15:0] rd_data,
  output logic        rd_valid,
  input  logic        rd_ready,
  // flash pins (both chips share all but rb_n and their io half)
  output logic [N_CE-1:0] ce_n,
  output logic        cle,
  output logic        ale,
  output logic        we_n,
  output logic        re_n,
  output logic [15:0] io_o,
  output logic        io_oe,
  input  logic [15:0] io_i,
  input  logic [1:0][N_CE-1:0] rb_n   // [chip][chip enable]
);
  localparam int unsigned PLANES   = 4;
  localparam int unsigned SLOTS    = N_CE * PLANES;
  localparam int unsigned SW       = $clog2(SLOTS);
  localparam int unsigned BAW      = $clog2(BLOCKS);
  localparam int unsigned PAW      = $clog2(PAGES);
  localparam int unsigned CW       = $clog2(PAGE_WORDS + 1);
  localparam int unsigned GROUPS   = BLOCKS / 4;
  localparam int unsigned GW       = $clog2(GROUPS);
  localparam logic [BAW-1:0] LAST_GRP = BAW'(BLOCKS / 2 - 2);

  typedef enum logic [1:0] {M_SCAN, M_ERASE, M_WRITE, M_READ} mode_e;
  typedef enum logic [3:0] {
    S_IDLE, S_GRP, S_WAIT_RB, S_CMD1, S_ADDR, S_DATA_W, S_CMD2,
    S_TWB, S_WAIT_RB2, S_DATA_R, S_NEXT, S_DRAIN
  } state_e;

  mode_e   mode;
  state_e  state;
  logic    phase;                 // 0: strobe low next, 1: strobe high next
  logic [BAW-1:0] grp_blk;        // even block address of the group
  logic [SW-1:0]  slot;
  logic [PAW-1:0] page;
  logic [CW-1:0]  wcnt;           // words moved in this page
  logic [2:0]     acnt;           // address cycle index
  logic [7:0]     tcnt;
  logic           grp_bad;
  logic           stop_pend;
  logic [31:0]    pages_cnt;
  logic [GW:0]    bbt_ptr;
  logic [BAW-1:0] bbt_addr;
  logic           bbt_app;
  logic [BAW-1:0] bbt_app_blk;

  // ready/busy synchroniser
  logic [1:0][N_CE-1:0] rb_s1, rb_s2;
  always_ff @(posedge clk) begin
    rb_s1 <= rb_n;
    rb_s2 <= rb_s1;
  end

  bbt_ram #(.DEPTH(GROUPS), .AWIDTH(BAW)) u_bbt (
    .clk, .rst, .clear(1'b0),
    .app_en(bbt_app), .app_addr(bbt_app_blk),
    .rd_idx(bbt_ptr), .rd_addr(bbt_addr), .n_entries(bad_groups)
  );

  // Address of the current slot.
  logic [SW-3:0]  cur_ce;
  logic [1:0]     cur_plane;
  logic [BAW-1:0] cur_blk;
  logic [23:0]    row;
  logic [15:0]    col;
  logic           ce_ready, all_ready;
  assign cur_ce    = slot[SW-1:2];
  assign cur_plane = slot[1:0];
  assign cur_blk   = grp_blk + BAW'(cur_plane[0]) + (cur_plane[1] ? BAW'(BLOCKS / 2) : '0);
  assign row       = 24'(cur_blk) * 24'(PAGES) + ((mode == M_WRITE || mode == M_READ) ? 24'(page) : 24'd0);
  assign col       = (mode == M_SCAN) ? 16'(SPARE_COL) : 16'd0;
  assign ce_ready  = rb_s2[0][cur_ce] && rb_s2[1][cur_ce];
  assign all_ready = &rb_s2;

  // Command and address bytes of the current operation.
  logic [7:0] cmd1, cmd2, abyte;
  logic [2:0] n_addr;
  always_comb begin
    unique case (mode)
      M_ERASE: begin cmd1 = CMD_ERASE1; cmd2 = CMD_ERASE2; end
      M_WRITE: begin cmd1 = CMD_PROG1;  cmd2 = CMD_PROG2;  end
      default: begin cmd1 = CMD_READ1;  cmd2 = CMD_READ2;  end
    endcase
    n_addr = (mode == M_ERASE) ? 3'd3 : 3'd5;
    // erase carries only the three row cycles
    unique case ((mode == M_ERASE) ? acnt + 3'd2 : acnt)
      3'd0:    abyte = col[7:0];
      3'd1:    abyte = col[15:8];
      3'd2:    abyte = row[7:0];
      3'd3:    abyte = row[15:8];
      default: abyte = row[23:16];
    endcase
  end

  logic [CW-1:0] read_words;
  assign read_words = (mode == M_SCAN) ? CW'(1) : CW'(PAGE_WORDS);

  assign busy    = (state != S_IDLE);
  assign fifo_rd = (state == S_DATA_W) && !phase && fifo_half;

  // Chip enable stays low from the first command until one clock after the
  // last strobe has returned high.
  logic ce_active;
  assign ce_active = (state inside {S_CMD1, S_ADDR, S_DATA_W, S_CMD2, S_TWB, S_WAIT_RB2, S_DATA_R, S_NEXT});
  always_comb begin
    for (int i = 0; i < N_CE; i++) ce_n[i] = !(ce_active && cur_ce == (SW-2)'(i));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mode          <= M_SCAN;
      state         <= S_GRP;      // invalid-block scan starts at power-up
      phase         <= 1'b0;
      grp_blk       <= '0;
      slot          <= '0;
      page          <= '0;
      wcnt          <= '0;
      acnt          <= '0;
      tcnt          <= '0;
      grp_bad       <= 1'b0;
      stop_pend     <= 1'b0;
      pages_cnt     <= '0;
      pages_written <= '0;
      bbt_ptr       <= '0;
      bbt_app       <= 1'b0;
      bbt_app_blk   <= '0;
      init_done     <= 1'b0;
      cle           <= 1'b0;
      ale           <= 1'b0;
      we_n          <= 1'b1;
      re_n          <= 1'b1;
      io_o          <= '0;
      io_oe         <= 1'b0;
      rd_data       <= '0;
      rd_valid      <= 1'b0;
    end else begin
      bbt_app <= 1'b0;
      if (rd_valid && rd_ready) rd_valid <= 1'b0;
      if (stop_req && mode == M_WRITE && state != S_IDLE) stop_pend <= 1'b1;

      unique case (state)
        S_IDLE: begin
          if (op_start && op != OP_NONE && init_done) begin
            unique case (op)
              OP_ERASE: mode <= M_ERASE;
              OP_WRITE: mode <= M_WRITE;
              default:  mode <= M_READ;
            endcase
            grp_blk   <= '0;
            slot      <= '0;
            page      <= '0;
            bbt_ptr   <= '0;
            pages_cnt <= '0;
            stop_pend <= stop_req && op == OP_WRITE;
            // reading back nothing ends at once
            state     <= (op == OP_READ && pages_written == 0) ? S_IDLE : S_GRP;
          end
        end

        // Detect invalid block: skip the group if it is the next entry of
        // the invalid-block list, and move the list pointer on.
        S_GRP: begin
          slot <= '0;
          if (mode != M_SCAN && bbt_addr == grp_blk) begin
            bbt_ptr <= bbt_ptr + 1'b1;
            // last group? else block address + 2
            if (grp_blk == LAST_GRP) state <= S_DRAIN;
            else begin grp_blk <= grp_blk + BAW'(2); state <= S_GRP; end
          end else begin
            state <= S_WAIT_RB;
          end
        end

        S_WAIT_RB: if (ce_ready) begin
          state <= S_CMD1;
          phase <= 1'b0;
        end

        S_CMD1: begin
          if (!phase) begin
            cle <= 1'b1; we_n <= 1'b0; io_o <= {cmd1, cmd1}; io_oe <= 1'b1; phase <= 1'b1;
          end else begin
            we_n <= 1'b1; phase <= 1'b0; acnt <= '0; state <= S_ADDR;
          end
        end

        S_ADDR: begin
          if (!phase) begin
            cle <= 1'b0; ale <= 1'b1; we_n <= 1'b0; io_o <= {abyte, abyte}; phase <= 1'b1;
          end else begin
            we_n <= 1'b1; phase <= 1'b0;
            if (acnt == n_addr - 3'd1) begin
              wcnt  <= '0;
              state <= (mode == M_WRITE) ? S_DATA_W : S_CMD2;
            end else acnt <= acnt + 3'd1;
          end
        end

        // "Is the FIFO half-full?" -> "Read FIFO and write FLASH"
        S_DATA_W: begin
          if (!phase) begin
            ale <= 1'b0;
            if (fifo_half) begin
              we_n <= 1'b0; io_o <= fifo_data; phase <= 1'b1;
            end
          end else begin
            we_n <= 1'b1; phase <= 1'b0;
            if (wcnt == CW'(PAGE_WORDS - 1)) state <= S_CMD2;   // FIFO has given 4K
            wcnt <= wcnt + 1'b1;
          end
        end

        S_CMD2: begin
          if (!phase) begin
            ale <= 1'b0; cle <= 1'b1; we_n <= 1'b0; io_o <= {cmd2, cmd2}; phase <= 1'b1;
          end else begin
            we_n <= 1'b1; phase <= 1'b0;
            tcnt  <= 8'(TWB);
            state <= S_TWB;
          end
        end

        S_TWB: begin
          cle <= 1'b0; io_oe <= 1'b0;
          // wait until R/B# has gone low and passed the synchroniser
          if (tcnt == 0) state <= (mode == M_SCAN || mode == M_READ) ? S_WAIT_RB2 : S_NEXT;
          else tcnt <= tcnt - 1'b1;
        end

        S_WAIT_RB2: if (ce_ready) begin
          wcnt  <= '0;
          phase <= 1'b0;
          state <= S_DATA_R;
        end

        S_DATA_R: begin
          if (!phase) begin
            if (mode == M_SCAN || !rd_valid || rd_ready) begin
              re_n <= 1'b0; phase <= 1'b1;
            end
          end else begin
            re_n <= 1'b1; phase <= 1'b0;
            if (mode == M_SCAN) begin
              if (io_i != 16'hFFFF) grp_bad <= 1'b1;
            end else begin
              rd_data  <= io_i;
              rd_valid <= 1'b1;
            end
            if (wcnt == read_words - 1'b1) state <= S_NEXT;
            wcnt <= wcnt + 1'b1;
          end
        end

        S_NEXT: begin
          cle <= 1'b0; ale <= 1'b0; io_oe <= 1'b0;
          unique case (mode)
            M_SCAN, M_ERASE: begin
              if (slot == SW'(SLOTS - 1)) begin
                if (mode == M_SCAN && grp_bad) bbt_app <= 1'b1;
                bbt_app_blk <= grp_blk;
                grp_bad <= 1'b0;
                // last group? else block address + 2
                if (grp_blk == LAST_GRP) state <= S_DRAIN;
                else begin grp_blk <= grp_blk + BAW'(2); state <= S_GRP; end
              end else begin
                slot  <= slot + 1'b1;
                state <= S_WAIT_RB;
              end
            end
            default: begin    // M_WRITE, M_READ: plane + 1, page + 1, group
              pages_cnt <= pages_cnt + 1'b1;
              if ((mode == M_WRITE && stop_pend) ||
                  (mode == M_READ && pages_cnt + 1 == pages_written)) begin
                state <= S_DRAIN;
              end else if (slot == SW'(SLOTS - 1)) begin
                slot <= '0;
                if (page == PAW'(PAGES - 1)) begin
                  page <= '0;
                  // last group? else block address + 2
                  if (grp_blk == LAST_GRP) state <= S_DRAIN;
                  else begin grp_blk <= grp_blk + BAW'(2); state <= S_GRP; end
                end else begin
                  page  <= page + 1'b1;
                  state <= S_WAIT_RB;
                end
              end else begin
                slot  <= slot + 1'b1;
                state <= S_WAIT_RB;
              end
            end
          endcase
        end

        S_DRAIN: begin
          cle <= 1'b0; ale <= 1'b0; io_oe <= 1'b0;
          if (all_ready && !bbt_app) begin
            if (mode == M_SCAN)  init_done     <= 1'b1;
            if (mode == M_WRITE) pages_written <= pages_cnt;
            stop_pend <= 1'b0;
            state     <= S_IDLE;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // Strobes are never low together, and data is only driven with WE#.
  a_one_strobe: assert property (@(posedge clk) disable iff (rst) !(!we_n && !re_n));
  a_cle_ale:    assert property (@(posedge clk) disable iff (rst) !(cle && ale));
  a_we_drives:  assert property (@(posedge clk) disable iff (rst) !we_n |-> io_oe);
endmodule
