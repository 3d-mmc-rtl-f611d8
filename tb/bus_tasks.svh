// Bus master task shared by the unit testbenches. The including module
// provides clk, req (bus_req_t) and rsp (bus_rsp_t). A request is driven
// after a falling edge and held until ready is seen high at a falling
// edge; lat returns the number of cycles from request to ready.
task automatic bus_xfer(input logic we, input logic [31:0] addr, input logic [31:0] wdata,
                        input logic [3:0] wstrb, output logic [31:0] rdata, output int lat);
  @(negedge clk);
  req.req = 1'b1; req.we = we; req.addr = addr; req.wdata = wdata; req.wstrb = wstrb;
  lat = 0;
  do begin
    @(negedge clk);
    lat++;
  end while (!rsp.ready && lat < 10000);
  rdata   = rsp.rdata;
  req.req = 1'b0;
endtask
