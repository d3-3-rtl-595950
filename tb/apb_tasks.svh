// apb_tasks.svh: APB master tasks for testbenches. Included inside a module
// that declares clk, apb_req (gnss_pkg::apb_req_t) and apb_rsp. Inputs
// change on the falling clock edge; a transfer takes two clocks
// (setup, access) as on APB, the slaves having no wait states.
task automatic apb_write(input logic [15:0] addr, input logic [31:0] data);
  @(negedge clk);
  apb_req.paddr   = addr;
  apb_req.pwdata  = data;
  apb_req.pwrite  = 1'b1;
  apb_req.psel    = 1'b1;
  apb_req.penable = 1'b0;
  @(negedge clk);
  apb_req.penable = 1'b1;
  @(negedge clk);
  apb_req.psel    = 1'b0;
  apb_req.penable = 1'b0;
  apb_req.pwrite  = 1'b0;
endtask

task automatic apb_read(input logic [15:0] addr, output logic [31:0] data);
  @(negedge clk);
  apb_req.paddr   = addr;
  apb_req.pwrite  = 1'b0;
  apb_req.psel    = 1'b1;
  apb_req.penable = 1'b0;
  @(negedge clk);
  apb_req.penable = 1'b1;
  #1 data = apb_rsp.prdata;
  @(negedge clk);
  apb_req.psel    = 1'b0;
  apb_req.penable = 1'b0;
endtask
