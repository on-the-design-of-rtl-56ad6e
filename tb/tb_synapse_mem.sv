// tb_synapse_mem: writes random rows with random bank masks into a reduced synapse
// memory, keeps a shadow copy in the testbench and checks every read (one-cycle
// latency, all banks in parallel, masked writes, old data on read-during-write).
module tb_synapse_mem;
  localparam int N = 16, K = 32;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rd_en, wr_en;
  logic [4:0] rd_addr, wr_addr;
  logic [N-1:0] wr_mask;
  logic [N-1:0][7:0] rd_data, wr_data;
  logic [N-1:0][7:0] shadow [K];

  synapse_mem #(.N(N), .K(K)) dut (.clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_mask, .wr_data);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [N-1:0][7:0] expect_d;
    rd_en = 0; wr_en = 0; rd_addr = 0; wr_addr = 0; wr_mask = '1; wr_data = '0;
    // fill all rows
    for (int a = 0; a < K; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 5'(a); wr_mask = '1;
      for (int b = 0; b < N; b++) wr_data[b] = 8'($urandom);
      shadow[a] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      rd_en = 1; rd_addr = 5'($urandom_range(0, K-1));
      wr_en = $urandom_range(0, 1); wr_addr = ($urandom_range(0, 3) == 0) ? rd_addr : 5'($urandom_range(0, K-1));
      wr_mask = N'($urandom);
      for (int b = 0; b < N; b++) wr_data[b] = 8'($urandom);
      expect_d = shadow[rd_addr];
      @(posedge clk); #1;
      checks++;
      if (rd_data !== expect_d) begin failures++; $display("FAIL read addr %0d", rd_addr); end
      if (wr_en) for (int b = 0; b < N; b++) if (wr_mask[b]) shadow[wr_addr][b] = wr_data[b];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
