// tb_dmava_full: the end-to-end test of tb_dmava_config_memory run on the
// memory at its default size, an XCV100 (1610 frames of 56 bytes, 202
// blocks), with no parameter changed. Runs cover the whole device, the first
// block, the last three blocks (including the two-frame remainder block),
// idle port cycles, a run of skipped rows, a zero-length run and a run past
// the end of the device; after each, all 90,160 bytes are compared with a
// model, and each run must take one clock per stream byte. The first run
// rewrites the whole device.
module tb_dmava_full;
  import dmava_pkg::*;
  localparam int NF = XCV100_FRAMES;
  localparam int FB = XCV100_BYTES;
  localparam int NB = (NF + 7) / 8;

  logic       clk = 0, rst_n = 0, cfg_valid = 0;
  cbyte_t     cfg_data = 0;
  logic       busy, op_done;
  logic [7:0] cfg_bits [NF][FB];
  logic [7:0] model    [NF][FB];
  int checks = 0, failures = 0, cyc = 0;
  int n_zero_row = 0, n_partial_row = 0, n_full_row = 0, n_multi = 0, n_lastblk = 0;
  int n_absent = 0, n_past_end = 0, n_empty_run = 0, n_idle = 0;

  dmava_config_memory dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s cycle=%0d", what, cyc);
    end
  endtask

  task automatic compare_memory(input string what);
    int bad = 0;
    for (int f = 0; f < NF; f++)
      for (int r = 0; r < FB; r++)
        if (cfg_bits[f][r] != model[f][r]) begin
          if (bad < 4) $display("  frame %0d byte %0d: got %h expected %h", f, r, cfg_bits[f][r], model[f][r]);
          bad++;
        end
    check(bad == 0, what);
  endtask

  // Send one byte; with idle_pct > 0 idle cycles are inserted at random.
  task automatic send(input cbyte_t b, input int idle_pct);
    while ($urandom_range(99) < idle_pct) begin
      cfg_valid = 0;
      @(posedge clk); #1;
      n_idle++;
    end
    cfg_valid = 1; cfg_data = b;
    @(posedge clk); #1;
    cfg_valid = 0;
  endtask

  // One configuration run. row_mode: 0 random, 1 all-zero VA, 2 all-ones VA.
  task automatic run(input int start, input int count, input int idle_pct, input int row_mode);
    int bytes = 0, t0, t_end;
    bit saw_done = 0;
    t0 = cyc;
    send(8'(start >> 8), idle_pct); send(8'(start), idle_pct);
    send(8'(count >> 8), idle_pct); send(8'(count), idle_pct);
    bytes = 4;
    if (count == 0) begin
      n_empty_run++;
      check(op_done && !busy, "empty run ends at once");
      saw_done = op_done;
    end else begin
      check(busy, "busy after header");
    end
    if (count > 1) n_multi++;
    if (start >= NB) n_past_end++;
    for (int bi = 0; bi < count; bi++) begin
      int blk = start + bi;
      if (blk == NB - 1) n_lastblk++;
      for (int r = 0; r < FB; r++) begin
        cbyte_t va;
        case (row_mode)
          1: va = 8'h00;
          2: va = 8'hff;
          default: va = ($urandom_range(3) == 0) ? 8'h00 : 8'($urandom);
        endcase
        if (va == 0) n_zero_row++;
        else if (va == 8'hff) n_full_row++;
        else n_partial_row++;
        send(va, idle_pct); bytes++;
        for (int j = 7; j >= 0; j--) begin
          if (va[j]) begin
            cbyte_t d = 8'($urandom);
            int f = blk * 8 + j;
            if (blk < NB && f < NF) model[f][r] = d;
            else if (blk == NB - 1) n_absent++;
            send(d, idle_pct); bytes++;
          end
        end
      end
    end
    if (count != 0) saw_done = op_done;
    t_end = cyc;
    check(saw_done, "op_done at end of run");
    check(!busy, "idle after run");
    if (idle_pct == 0) check(t_end - t0 == bytes, "one clock per byte");
    compare_memory("memory after run");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < NF; f++) for (int r = 0; r < FB; r++) model[f][r] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    compare_memory("memory cleared by reset");
    run(0, NB, 0, 0);        // whole device, random rows (a full reconfiguration)
    run(0, 1, 0, 2);         // first block, every byte
    run(NB - 3, 3, 0, 0);    // last three blocks, random rows, short last block
    run(100, 2, 20, 0);      // two blocks with idle port cycles
    run(50, 1, 0, 1);        // all rows skipped: memory must be unchanged
    run(7, 0, 0, 0);         // zero-length run
    run(NB, 1, 0, 0);        // past the end of the device
    $display("mechanisms: zero_row=%0d partial_row=%0d full_row=%0d multi_block=%0d last_block=%0d absent=%0d past_end=%0d empty_run=%0d idle=%0d",
             n_zero_row, n_partial_row, n_full_row, n_multi, n_lastblk, n_absent, n_past_end, n_empty_run, n_idle);
    check(n_zero_row > 0, "zero-VA row seen");
    check(n_partial_row > 0, "partial row seen");
    check(n_full_row > 0, "full row seen");
    check(n_multi > 0, "multi-block run seen");
    check(n_lastblk > 0, "short last block seen");
    check(n_absent > 0, "absent frame bytes seen");
    check(n_past_end > 0, "run past end seen");
    check(n_empty_run > 0, "zero-length run seen");
    check(n_idle > 0, "idle port cycles seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
