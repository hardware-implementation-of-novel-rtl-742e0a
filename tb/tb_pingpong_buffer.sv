// tb_pingpong_buffer: feeds random words, with random idle clocks, into the
// serial-to-parallel buffer and checks that every group of eight comes out
// in arrival order (out[0] oldest), that out_valid pulses for one clock right
// after the clock edge that takes the eighth word and at no other time, and
// that the outputs hold between loads. Stimulus is driven and outputs are
// checked on the falling clock edge.
module tb_pingpong_buffer;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [11:0] in_data = 0;
  logic out_valid;
  logic signed [11:0] out_data [8];
  int checks = 0, failures = 0;
  logic signed [11:0] grp [8];
  logic signed [11:0] prev [8];

  pingpong_buffer #(.N(8), .W(12)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 40; g++) begin
      for (int i = 0; i < 8; i++) begin
        while ($urandom_range(2) == 0) begin
          in_valid = 0;
          @(negedge clk);
          check(!out_valid, "no pulse while idle");
          if (g > 0) for (int j = 0; j < 8; j++) check(out_data[j] == prev[j], "outputs hold");
        end
        in_valid = 1;
        in_data  = 12'($urandom);
        grp[i]   = in_data;
        @(negedge clk);
        if (i == 7) begin
          check(out_valid, "out_valid after the 8th word");
          for (int j = 0; j < 8; j++)
            check(out_data[j] == grp[j], $sformatf("group %0d word %0d", g, j));
          prev = grp;
        end else begin
          check(!out_valid, "no pulse inside a group");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
