// tb_main_controller: feeds the controller complete configuration runs
// (header, then per row a VA byte and its data bytes) with random idle
// cycles in between, and checks for every byte the control strobes it
// raises, the block address, the end-of-run pulse and that a run takes one
// clock per byte. The VA decoder's last/done are modelled here by a count
// of remaining VA bits. Runs include a zero block count, full and empty
// rows, and multi-block runs. ROWS is reduced to 4 to keep runs short.
module tb_main_controller;
  import dmava_pkg::*;
  localparam int ROWS = 4;

  typedef enum int {K_HDR, K_VA, K_DATA} kind_t;
  typedef struct {
    cbyte_t b;
    kind_t  k;
    int     blk;
    bit     wb;
    bit     last_of_run;
  } item_t;

  logic        clk = 0, rst_n = 0, cfg_valid = 0;
  cbyte_t      cfg_data = 0;
  logic        vad_last, vad_done;
  logic        load_va, take_byte, load_row, wb_shift, blk_en, busy, op_done;
  logic [15:0] blk_addr;
  ctrl_state_t state;
  int          vcount = 0;
  int checks = 0, failures = 0;
  item_t q[$];

  main_controller #(.ROWS(ROWS)) dut (.*);

  assign vad_done = (vcount == 0);
  assign vad_last = (vcount == 1);

  int          cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  always_ff @(posedge clk) begin
    if (load_va)        vcount <= $countones(cfg_data);
    else if (take_byte) vcount <= vcount - 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  function automatic void add_run(int start, int count);
    q.push_back('{b: 8'(start >> 8), k: K_HDR, blk: -1, wb: 0, last_of_run: 0});
    q.push_back('{b: 8'(start),      k: K_HDR, blk: -1, wb: 0, last_of_run: 0});
    q.push_back('{b: 8'(count >> 8), k: K_HDR, blk: -1, wb: 0, last_of_run: 0});
    q.push_back('{b: 8'(count),      k: K_HDR, blk: -1, wb: 0, last_of_run: (count == 0)});
    for (int bi = 0; bi < count; bi++) begin
      for (int r = 0; r < ROWS; r++) begin
        cbyte_t va;
        int n;
        bit endrow;
        case ($urandom_range(3))
          0: va = 8'h00;
          1: va = 8'hff;
          default: va = 8'($urandom);
        endcase
        n = $countones(va);
        endrow = (bi == count - 1) && (r == ROWS - 1);
        q.push_back('{b: va, k: K_VA, blk: start + bi, wb: (n == 0), last_of_run: endrow && n == 0});
        for (int d = 0; d < n; d++)
          q.push_back('{b: 8'($urandom), k: K_DATA, blk: start + bi, wb: (d == n - 1),
                        last_of_run: endrow && d == n - 1});
      end
    end
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int runs_done = 0, expect_done = 0;
    int gap_cycles = 0;
    int t0, bytes_in_run;
    add_run(5, 1);
    add_run(300, 0);
    add_run(17, 3);
    add_run(65535, 1);
    add_run(0, 2);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(!busy && state == ST_HDR, "idle after reset");
    // Back-to-back part: time one run with no idle cycles.
    bytes_in_run = 0;
    t0 = cyc;
    while (q.size() > 0) begin
      item_t it;
      bit gap;
      gap = (runs_done >= 2) && ($urandom_range(4) == 0);
      if (gap) begin
        cfg_valid = 0; #1;
        check(!load_va && !take_byte && !load_row && !wb_shift, "no strobe when idle");
        @(posedge clk); #1;
        gap_cycles++;
        check(!op_done || expect_done == 1, "op_done only after last byte");
        expect_done = 0;
        continue;
      end
      it = q.pop_front();
      cfg_valid = 1; cfg_data = it.b;
      #1;
      check(load_va == (it.k == K_VA), "load_va");
      check(load_row == (it.k == K_VA), "load_row");
      check(take_byte == (it.k == K_DATA), "take_byte");
      check(wb_shift == it.wb, "wb_shift");
      if (it.k != K_HDR) check(blk_en && blk_addr == 16'(it.blk), "block address");
      else               check(!blk_en, "no block during header");
      if (runs_done == 0) bytes_in_run++;
      @(posedge clk); #1;
      cfg_valid = 0;
      check(op_done == it.last_of_run, "op_done pulse");
      if (it.last_of_run) begin
        runs_done++;
        if (runs_done == 1) begin
          check(cyc - t0 == bytes_in_run, "one clock per byte");
        end
      end
    end
    @(posedge clk); #1;
    check(!op_done, "op_done is one clock");
    check(runs_done == 5, "all runs ended");
    check(gap_cycles > 0, "idle cycles exercised");
    check(state == ST_HDR && !busy, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
