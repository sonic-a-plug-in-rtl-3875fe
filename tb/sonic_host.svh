// sonic_host.svh: host-side helpers shared by the board-level testbenches. Included inside
// a testbench module that declares clk, the sonic_top host port signals, checks/failures
// and a check() task.

// host word address: PIPE number, space (0 PR, 1 PM, 2 PE, 3 LBC), word offset
function automatic logic [25:0] haddr(int pipe, int space, int off);
  return {3'(pipe), 2'(space), 1'b0, 20'(off)};
endfunction

int host_waits = 0;

// sequential burst of n words, host_req held high; one word per clock when the PIPE keeps up
task automatic host_burst(bit wr, int pipe, int space, int off, ref logic [31:0] d[$], input int n);
  int i = 0;
  bit pend = 0;
  @(negedge clk);
  if (!wr) d.delete();
  while (i < n || pend) begin
    if (pend) begin #1; check(host_rvalid, "read data valid"); d.push_back(host_rdata); pend = 0; end
    if (i < n) begin
      host_req = 1; host_wr = wr; host_addr = haddr(pipe, space, off + i);
      host_wdata = wr ? d[i] : 0;
      #1;
      if (host_ack) begin i++; pend = !wr; end
      else host_waits++;
    end else host_req = 0;
    @(negedge clk);
  end
  host_req = 0;
endtask

task automatic host_write(int pipe, int space, int off, logic [31:0] v);
  logic [31:0] d[$];
  d.push_back(v);
  host_burst(1, pipe, space, off, d, 1);
endtask

task automatic host_read(int pipe, int space, int off, output logic [31:0] v);
  logic [31:0] d[$];
  host_burst(0, pipe, space, off, d, 1);
  v = d[0];
endtask

// one 1-D FIR pass over a run of RGBa pixels: centred taps, nearest pixel of the run beyond
// its ends, sum >> shift, saturate to 255, alpha from the centre pixel
function automatic void fir_ref(ref logic [31:0] run[$], ref logic [31:0] res[$],
                                input int unsigned cf[], input int unsigned sh);
  int taps = cf.size(), half = cf.size() / 2;
  res.delete();
  for (int j = 0; j < run.size(); j++) begin
    logic [31:0] o;
    o[7:0] = run[j][7:0];
    for (int c = 0; c < 3; c++) begin
      longint unsigned acc = 0;
      for (int k = 0; k < taps; k++) begin
        int idx = j + k - half;
        if (idx < 0) idx = 0;
        if (idx >= run.size()) idx = run.size() - 1;
        acc += cf[k] * run[idx][31-8*c -: 8];
      end
      acc >>= sh;
      o[31-8*c -: 8] = (acc > 255) ? 8'd255 : 8'(acc);
    end
    res.push_back(o);
  end
endfunction

// filter every row (horizontal) or every column (vertical) of a w x h image in place
function automatic void fir_rows(ref logic [31:0] img[$], input int w, input int h,
                                 input int unsigned cf[], input int unsigned sh);
  logic [31:0] run[$], res[$];
  for (int y = 0; y < h; y++) begin
    run.delete(); for (int x = 0; x < w; x++) run.push_back(img[y*w+x]);
    fir_ref(run, res, cf, sh); for (int x = 0; x < w; x++) img[y*w+x] = res[x];
  end
endfunction

function automatic void fir_cols(ref logic [31:0] img[$], input int w, input int h,
                                 input int unsigned cf[], input int unsigned sh);
  logic [31:0] run[$], res[$];
  for (int x = 0; x < w; x++) begin
    run.delete(); for (int y = 0; y < h; y++) run.push_back(img[y*w+x]);
    fir_ref(run, res, cf, sh); for (int y = 0; y < h; y++) img[y*w+x] = res[y];
  end
endfunction

// load the coefficients and the shift into a PIPE's engine
task automatic set_filter(int pipe, int unsigned cf[], int unsigned sh);
  logic [31:0] d[$];
  foreach (cf[k]) d.push_back(cf[k]);
  d.push_back(sh);
  host_burst(1, pipe, 2, 0, d, d.size());
endtask

// the API's "wait for done": poll the PR's FLOW register until bit 0 is set
task automatic wait_done(int pipe, int limit, output int took);
  logic [31:0] v;
  int t0 = cyc;
  v = 0;
  while (!v[0] && cyc - t0 < limit) host_read(pipe, 0, 4, v);
  took = cyc - t0;
  check(v[0], $sformatf("PIPE %0d finished", pipe));
endtask
