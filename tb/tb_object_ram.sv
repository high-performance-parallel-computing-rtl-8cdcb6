// tb_object_ram: the object point memory at its full 65,536-entry size.
// Random points are written to random addresses, including the first and
// last, and read back one clock after the read request; a read with re low
// must leave the output unchanged.
module tb_object_ram;
  import horn8_pkg::*;

  logic clk = 0, we = 0, re = 0;
  logic [15:0] waddr = 0, raddr = 0;
  obj_point_t  wdata = '0, rdata;
  int checks = 0, failures = 0;

  object_ram dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    obj_point_t model [int];
    int addrs[$];
    obj_point_t held;
    addrs = '{0, 65535, 1, 32768};
    for (int i = 0; i < 400; i++) addrs.push_back($urandom_range(65535));
    foreach (addrs[i]) begin
      @(negedge clk);
      we = 1; waddr = 16'(addrs[i]); wdata = obj_point_t'({$urandom, $urandom});
      model[addrs[i]] = wdata;
    end
    @(negedge clk);
    we = 0;
    foreach (addrs[i]) begin
      re = 1; raddr = 16'(addrs[i]);
      @(negedge clk);
      checks++;
      if (rdata !== model[addrs[i]]) begin
        failures++;
        $display("addr %0d: read %h expected %h", addrs[i], rdata, model[addrs[i]]);
      end
      if (i % 5 == 0) begin
        held = rdata;
        re = 0; raddr = 16'($urandom);
        @(negedge clk);
        checks++;
        if (rdata !== held) begin
          failures++;
          $display("output changed with re low");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
