// tb_tvm - test vector memory: preload random words at random addresses
// through the write port, read them back asynchronously (same cycle, no
// clock) with readwr high, and check that readwr low gives zero.
module tb_tvm;
  localparam int ADDR_W = 10;
  localparam int WIDTH  = 36;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              readwr, load;
  logic [ADDR_W-1:0] address, load_addr;
  logic [WIDTH-1:0]  data_out, load_data;

  tvm #(.ADDR_W(ADDR_W), .WIDTH(WIDTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [2**ADDR_W];

  initial begin
    readwr = 1'b0; load = 1'b0; address = '0; load_addr = '0; load_data = '0;
    for (int a = 0; a < 2**ADDR_W; a++) begin
      @(negedge clk);
      load = 1'b1; load_addr = ADDR_W'(a);
      load_data = WIDTH'({$urandom, $urandom});
      model[a] = load_data;
    end
    @(negedge clk);
    load = 1'b0;
    // random overwrites
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      load = 1'b1; load_addr = ADDR_W'($urandom);
      load_data = WIDTH'({$urandom, $urandom});
      model[load_addr] = load_data;
    end
    @(negedge clk);
    load = 1'b0;
    for (int i = 0; i < 500; i++) begin
      address = ADDR_W'($urandom);
      readwr = 1'b1;
      #1;
      checks++;
      if (data_out !== model[address]) begin
        failures++;
        $display("FAIL: addr %0d read %h expected %h", address, data_out, model[address]);
      end
      readwr = 1'b0;
      #1;
      checks++;
      if (data_out !== '0) begin
        failures++;
        $display("FAIL: disabled memory drives %h", data_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
