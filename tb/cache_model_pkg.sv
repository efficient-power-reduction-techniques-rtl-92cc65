// cache_model_pkg: behavioural set-associative cache model for testbenches.
//
// Produces the address stream that reaches DRAM behind a cache hierarchy.
// A cache has `sets` x `ways` lines of `line` bytes, each line split into
// `sectors` equal sectors with their own valid bit; replacement is LRU,
// allocation happens on every miss, and write-backs are not modelled (only
// refill addresses are produced). access() returns 1 on a hit; on a miss it
// returns 0 and the byte address of the missing sector (the unit a burst
// refill fetches).
package cache_model_pkg;

  class cache_model;
    int unsigned sets, ways, line, sectors, sector_bytes;
    int unsigned tags  [];   // [set*ways + way]
    bit          valid [];   // [(set*ways + way)*sectors + sector]
    bit          used  [];   // line allocated
    int unsigned age   [];   // LRU age, 0 = most recent
    string       name;

    function new(string n, int unsigned size_bytes, int unsigned line_bytes,
                 int unsigned assoc, int unsigned nsect = 1);
      name = n;
      line = line_bytes;
      ways = assoc;
      sectors = nsect;
      sector_bytes = line_bytes / nsect;
      sets = size_bytes / (line_bytes * assoc);
      tags  = new[sets * ways];
      used  = new[sets * ways];
      age   = new[sets * ways];
      valid = new[sets * ways * sectors];
      foreach (age[i]) age[i] = i % ways;
    endfunction

    function void touch(int unsigned set, int unsigned way);
      int unsigned a;
      a = age[set*ways + way];
      for (int unsigned w = 0; w < ways; w++)
        if (age[set*ways + w] < a) age[set*ways + w]++;
      age[set*ways + way] = 0;
    endfunction

    function bit access(logic [31:0] addr, output logic [31:0] miss_addr);
      int unsigned lineno, set, tag, sect, victim;
      lineno = addr / line;
      set    = lineno % sets;
      tag    = lineno / sets;
      sect   = (addr % line) / sector_bytes;
      miss_addr = (addr / sector_bytes) * sector_bytes;
      for (int unsigned w = 0; w < ways; w++) begin
        if (used[set*ways + w] && tags[set*ways + w] == tag) begin
          touch(set, w);
          if (valid[(set*ways + w)*sectors + sect]) return 1'b1;
          valid[(set*ways + w)*sectors + sect] = 1'b1;
          return 1'b0;
        end
      end
      victim = 0;
      for (int unsigned w = 0; w < ways; w++)
        if (age[set*ways + w] == ways - 1) victim = w;
      used[set*ways + victim] = 1'b1;
      tags[set*ways + victim] = tag;
      for (int unsigned s = 0; s < sectors; s++)
        valid[(set*ways + victim)*sectors + s] = (s == sect);
      touch(set, victim);
      return 1'b0;
    endfunction
  endclass

endpackage
