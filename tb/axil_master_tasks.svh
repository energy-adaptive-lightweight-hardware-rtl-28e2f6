// AXI4-Lite master tasks shared by the testbenches. Call them just after a
// rising clock edge (not at the edge itself). Expects in scope: clk,
// the s_axil_* signals of the slave, and check(). Signals are driven just
// after a rising edge and handshakes are observed at the falling edge.

task automatic axil_write(logic [4:0] addr, logic [31:0] data, logic [3:0] strb = 4'hf);
  s_axil_awaddr = addr; s_axil_wdata = data; s_axil_wstrb = strb;
  s_axil_awvalid = 1'b1; s_axil_wvalid = 1'b1;
  do @(negedge clk); while (!(s_axil_awready && s_axil_wready));
  @(posedge clk); #1;
  s_axil_awvalid = 1'b0; s_axil_wvalid = 1'b0;
  s_axil_bready = 1'b1;
  do @(negedge clk); while (!s_axil_bvalid);
  check(s_axil_bresp == 2'b00, "write response OKAY");
  @(posedge clk); #1;
  s_axil_bready = 1'b0;
endtask

task automatic axil_read(logic [4:0] addr, output logic [31:0] data);
  s_axil_araddr = addr; s_axil_arvalid = 1'b1;
  do @(negedge clk); while (!s_axil_arready);
  @(posedge clk); #1;
  s_axil_arvalid = 1'b0;
  s_axil_rready = 1'b1;
  do @(negedge clk); while (!s_axil_rvalid);
  data = s_axil_rdata;
  @(posedge clk); #1;
  s_axil_rready = 1'b0;
endtask
