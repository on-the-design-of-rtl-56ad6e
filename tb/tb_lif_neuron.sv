// tb_lif_neuron: self-checking test of the LIF neuron against a reference model
// written in the testbench: integration with clamping and overflow, leak, firing
// above threshold, reset and the refractory period, over random stimulus.
module tb_lif_neuron;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic syn_valid, leak_en, fire_en, spike, refr;
  logic signed [7:0] weight;
  logic [12:0] thr, leak;
  logic [3:0]  refp;
  logic [13:0] vmem;

  lif_neuron dut (.clk, .rst_n, .syn_valid, .weight, .leak_en, .fire_en,
                  .threshold(thr), .leak_val(leak), .ref_period(refp),
                  .spike_o(spike), .vmem_o(vmem), .refractory_o(refr));

  // reference model
  int mv, mref; bit movf, mspk;
  int fires = 0, refr_blocks = 0, ovfs = 0;

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (v=%0d/%0d ovf=%0b)", m, vmem[12:0], mv, vmem[13]); end
  endtask

  task automatic do_syn(int w);
    syn_valid = 1; weight = 8'(w);
    @(posedge clk); #1 syn_valid = 0;
    if (mref == 0) begin
      mv = mv + w;
      if (mv < 0) mv = 0;
      if (mv > 8191) begin mv = 8191; movf = 1; ovfs++; end
    end else refr_blocks++;
  endtask

  task automatic do_step();
    leak_en = 1; @(posedge clk); #1 leak_en = 0;
    mv = (mv > int'(leak)) ? mv - int'(leak) : 0;
    if (mref > 0) mref--;
    fire_en = 1; @(posedge clk); #1 fire_en = 0;
    if (movf || mv > int'(thr)) begin mspk = 1; mv = 0; movf = 0; mref = refp; fires++; end
    else mspk = 0;
    check(spike == mspk, "spike");
    check(vmem[12:0] == 13'(mv) && vmem[13] == movf, "vmem after fire");
    check(refr == (mref != 0), "refractory flag");
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    syn_valid = 0; leak_en = 0; fire_en = 0; weight = 0;
    thr = 13'd300; leak = 13'd5; refp = 4'd2;
    mv = 0; mref = 0; movf = 0; mspk = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // directed: accumulate 3 x 100 = 300 -> not above threshold, leak 5 -> 295
    do_syn(100); do_syn(100); do_syn(100);
    check(vmem[12:0] == 13'd300, "integrate 300");
    do_step();
    check(!spike, "no spike at 295");
    // push above threshold
    do_syn(50);
    do_step();
    check(spike, "spike above threshold");
    check(vmem == 0, "reset after spike");
    // refractory: input ignored for two steps
    do_syn(100);
    check(vmem == 0, "ignored while refractory");
    do_step(); do_syn(100); check(vmem == 0, "still refractory");
    do_step(); do_syn(100); check(vmem[12:0] == 13'd100, "accumulates after refractory");
    // negative weights clamp at zero
    do_syn(-128); check(vmem == 0, "clamp at zero");
    // overflow: huge potential with high threshold
    thr = 13'd8190;
    repeat (70) do_syn(127);
    check(vmem[13], "overflow bit set");
    do_step(); check(spike, "overflow fires");
    // random
    thr = 13'd400; leak = 13'd3; refp = 4'd1;
    for (int s = 0; s < 300; s++) begin
      int n;
      n = $urandom_range(0, 6);
      for (int k = 0; k < n; k++) begin
        do_syn(int'($urandom_range(0, 160)) - 40);
        check(vmem[12:0] == 13'(mv) && vmem[13] == movf, "random integrate");
      end
      do_step();
    end
    check(fires > 10 && refr_blocks > 5 && ovfs > 0, "mechanisms exercised");
    $display("fires=%0d refractory_blocks=%0d overflows=%0d", fires, refr_blocks, ovfs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
