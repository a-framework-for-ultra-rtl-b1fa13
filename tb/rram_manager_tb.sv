// Testbench of rram_manager with a simple model of the block chain (a 16-bit
// shift register and a busy timer): host shifts reach the chain only while the
// core is ready and the manager idle; host commands and central-control load
// requests are broadcast once, the manager stays busy until the blocks are
// done, load_done pulses once per load, and a pending load request wins over
// a simultaneous host command.
module rram_manager_tb;
  import afib_pkg::*;
  logic clk = 0, rst_n = 0;
  logic io_sess = 0, io_cmd_valid = 0, io_shift = 0, io_sdi = 0, io_sdo, busy;
  blk_cmd_e io_cmd = BC_NONE;
  logic load_req = 0, load_done, pwr_req, pc_ready = 0;
  logic blk_cmd_valid, blk_busy, chain_shift, chain_in, chain_out;
  blk_cmd_e blk_cmd;
  int checks = 0, failures = 0;
  logic [15:0] chain = 0;
  int btimer = 0, n_bcast = 0, n_done = 0;
  blk_cmd_e last_cmd;

  rram_manager dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign chain_out = chain[15];
  assign blk_busy  = btimer > 0;
  always @(posedge clk) if (rst_n) begin
    if (chain_shift) chain <= {chain[14:0], chain_in};
    if (blk_cmd_valid) begin btimer <= 5; n_bcast++; last_cmd <= blk_cmd; end
    else if (btimer > 0) btimer <= btimer - 1;
    if (load_done) n_done++;
  end

  task automatic wait_idle();
    automatic int n = 0;
    @(negedge clk);
    while (busy && n < 100) begin @(negedge clk); n++; end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    io_sess = 1; @(negedge clk);
    checks++; if (!pwr_req || !busy) failures++;           // power requested, not ready yet
    io_shift = 1; io_sdi = 1; @(negedge clk); io_shift = 0;
    checks++; if (chain != 0) failures++;                   // no shift before ready
    pc_ready = 1; @(negedge clk);
    checks++; if (busy) failures++;
    for (int i = 0; i < 16; i++) begin io_shift = 1; io_sdi = i[0]; @(negedge clk); end
    io_shift = 0;
    checks++; if (chain != 16'h5555) begin failures++; $display("chain %h", chain); end
    for (int i = 0; i < 16; i++) begin
      checks++; if (io_sdo != i[0]) failures++;
      io_shift = 1; io_sdi = 0; @(negedge clk);
    end
    io_shift = 0;
    // host program command
    io_cmd = BC_PROGRAM; io_cmd_valid = 1; @(negedge clk); io_cmd_valid = 0;
    checks++; if (!busy) failures++;
    io_shift = 1; @(negedge clk); io_shift = 0;              // ignored while busy
    wait_idle();
    checks++; if (n_bcast != 1 || last_cmd != BC_PROGRAM || chain != 0) begin failures++; $display("program %0d", n_bcast); end
    // load request and host command at the same time: load first
    load_req = 1; io_cmd = BC_CAPTURE; io_cmd_valid = 1;
    while (!load_done) @(negedge clk);
    load_req = 0;
    checks++; if (last_cmd != BC_LOAD) failures++;
    wait_idle();
    io_cmd_valid = 0;
    wait_idle();
    checks++; if (n_done != 1 || n_bcast < 3 || last_cmd != BC_CAPTURE) begin failures++; $display("done %0d bcast %0d", n_done, n_bcast); end
    io_sess = 0; @(negedge clk);
    checks++; if (pwr_req) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
