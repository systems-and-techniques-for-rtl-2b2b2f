// tb_dmava_sequence: a reconfiguration sequence on the full XCV100-size
// memory (defaults, no parameter changed). Starting from a first
// configuration written whole, each next configuration is reached by
// sending only its difference: every maximal range of consecutive blocks
// that holds a changed byte becomes one run, and in it every row's VA byte
// marks the frames whose byte changes. The sequence mixes core swaps (a
// band of frames replaced by new random content) and small updates (a few
// scattered bytes, like new filter coefficients). After each step the whole
// memory must equal the target, and the step must take one clock per
// stream byte. The testbench prints, per step, the stream size next to the
// size of loading every changed frame whole (56 bytes each, addresses not
// counted), the frame-level partial reconfiguration this memory improves
// on. The configurations are generated; they are not real circuits.
module tb_dmava_sequence;
  import dmava_pkg::*;
  localparam int NF = XCV100_FRAMES;
  localparam int FB = XCV100_BYTES;
  localparam int NB = (NF + 7) / 8;

  logic       clk = 0, rst_n = 0, cfg_valid = 0;
  cbyte_t     cfg_data = 0;
  logic       busy, op_done;
  logic [7:0] cfg_bits [NF][FB];
  logic [7:0] cur      [NF][FB];
  logic [7:0] nxt      [NF][FB];
  int checks = 0, failures = 0, cyc = 0;
  int n_core = 0, n_small = 0, n_runs = 0, n_multi_run_steps = 0;

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

  task automatic send(input cbyte_t b);
    cfg_valid = 1; cfg_data = b;
    @(posedge clk); #1;
    cfg_valid = 0;
  endtask

  function automatic bit block_dirty(int blk);
    for (int j = 0; j < 8; j++) begin
      int f = blk * 8 + j;
      if (f < NF) for (int r = 0; r < FB; r++) if (cur[f][r] != nxt[f][r]) return 1;
    end
    return 0;
  endfunction

  // Send the difference cur -> nxt; returns the number of stream bytes.
  task automatic send_difference(output int bytes, output int runs);
    int blk = 0;
    bytes = 0; runs = 0;
    while (blk < NB) begin
      if (!block_dirty(blk)) begin
        blk++;
        continue;
      end
      begin
        int first = blk, count;
        while (blk < NB && block_dirty(blk)) blk++;
        count = blk - first;
        send(8'(first >> 8)); send(8'(first)); send(8'(count >> 8)); send(8'(count));
        bytes += 4;
        for (int b = first; b < first + count; b++) begin
          for (int r = 0; r < FB; r++) begin
            cbyte_t va = '0;
            for (int j = 0; j < 8; j++)
              if (b * 8 + j < NF && cur[b*8+j][r] != nxt[b*8+j][r]) va[j] = 1'b1;
            send(va); bytes++;
            for (int j = 7; j >= 0; j--) if (va[j]) begin
              send(nxt[b*8+j][r]); bytes++;
            end
          end
        end
        check(op_done, "op_done after run");
        runs++;
      end
    end
  endtask

  task automatic compare_memory(input string what);
    int bad = 0;
    for (int f = 0; f < NF; f++)
      for (int r = 0; r < FB; r++)
        if (cfg_bits[f][r] != nxt[f][r]) bad++;
    if (bad != 0) $display("  %0d bytes differ", bad);
    check(bad == 0, what);
  endtask

  task automatic step(input string name);
    int bytes, runs, t0, frames_changed = 0;
    for (int f = 0; f < NF; f++) begin
      bit ch = 0;
      for (int r = 0; r < FB; r++) if (cur[f][r] != nxt[f][r]) ch = 1;
      if (ch) frames_changed++;
    end
    t0 = cyc;
    send_difference(bytes, runs);
    n_runs += runs;
    if (runs > 1) n_multi_run_steps++;
    check(cyc - t0 == bytes, "one clock per stream byte");
    compare_memory(name);
    $display("%-28s runs=%0d stream=%0d bytes (%0d clocks)  whole changed frames=%0d bytes",
             name, runs, bytes, cyc - t0, frames_changed * FB);
    for (int f = 0; f < NF; f++) for (int r = 0; r < FB; r++) cur[f][r] = nxt[f][r];
  endtask

  task automatic core_swap(input int f0, input int nframes, input int density_pct);
    n_core++;
    for (int f = f0; f < f0 + nframes && f < NF; f++)
      for (int r = 0; r < FB; r++)
        if ($urandom_range(99) < density_pct) nxt[f][r] = 8'($urandom);
  endtask

  task automatic small_update(input int nbytes);
    n_small++;
    for (int k = 0; k < nbytes; k++) begin
      int f = $urandom_range(NF - 1), r = $urandom_range(FB - 1);
      nxt[f][r] = nxt[f][r] ^ 8'($urandom_range(1, 255));
    end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < NF; f++) for (int r = 0; r < FB; r++) begin
      cur[f][r] = '0; nxt[f][r] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    core_swap(0, 400, 60);   step("first circuit");
    core_swap(0, 400, 30);   step("core swap, same area");
    core_swap(600, 320, 45); step("core swap, second area");
    small_update(12);        step("coefficient update");
    core_swap(1500, 110, 50); small_update(3); step("core swap at device end");
    check(n_core > 0 && n_small > 0, "both kinds of update seen");
    check(n_multi_run_steps > 0, "a step with several runs seen");
    $display("steps: core=%0d small=%0d runs=%0d", n_core, n_small, n_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
